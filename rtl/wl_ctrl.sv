// wl_ctrl: word-length and supply-voltage controller of the equalizer datapath.
//
// Maps the active modulation scheme to the precision of the multipliers and to
// the supply voltage that keeps the reduced-precision datapath at the same
// throughput as the full 15-bit one:
//   QPSK 9 bits 1.35 V, 16-QAM 11 bits 1.50 V, 64-QAM 13 bits 1.65 V,
//   256-QAM 15 bits 1.80 V.
// The voltage request goes to an external regulator (vdd_mv, in millivolts).
// Because a longer word has a longer critical path, a switch to a higher
// precision first raises the voltage request and waits SETTLE cycles for the
// supply before widening the word; a switch to a lower precision narrows the
// word at once and lowers the voltage in the same cycle. busy is high while a
// voltage rise is settling. switched pulses for one cycle when a new precision
// takes effect.
//
// Bit 10 of vdd_mv is always 1 (every level is above 1024 mV); synthesis
// reports it as a constant output, which is expected.
//
// From the document: the four precisions and their voltages (Table 5) and
// the word lengths chosen per scheme in its simulations. This design's choice:
// the settle counter, its length and the ordering of voltage and precision
// changes.
module wl_ctrl
  import sdr_pkg::*;
#(
  parameter int unsigned SETTLE = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  mod_e               mod,
  output logic [PREC_W-1:0]  prec,
  output logic [10:0]        vdd_mv,
  output logic               busy,
  output logic               switched
);

  function automatic logic [PREC_W-1:0] prec_of(mod_e m);
    case (m)
      MOD_QPSK:  return PREC_W'(9);
      MOD_QAM16: return PREC_W'(11);
      MOD_QAM64: return PREC_W'(13);
      default:   return PREC_W'(15);
    endcase
  endfunction

  function automatic logic [10:0] vdd_of(mod_e m);
    case (m)
      MOD_QPSK:  return 11'd1350;
      MOD_QAM16: return 11'd1500;
      MOD_QAM64: return 11'd1650;
      default:   return 11'd1800;
    endcase
  endfunction

  localparam int unsigned CW = $clog2(SETTLE + 1);
  logic [CW-1:0]      cnt;
  logic [PREC_W-1:0]  target;

  assign target = prec_of(mod);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prec     <= PREC_W'(W);        // start at full precision and voltage
      vdd_mv   <= 11'd1800;
      busy     <= 1'b0;
      cnt      <= '0;
      switched <= 1'b0;
    end else begin
      switched <= 1'b0;
      if (target < prec) begin
        prec     <= target;
        vdd_mv   <= vdd_of(mod);
        busy     <= 1'b0;
        cnt      <= '0;
        switched <= 1'b1;
      end else if (target > prec) begin
        vdd_mv <= vdd_of(mod);
        if (busy && cnt == CW'(SETTLE - 1)) begin
          prec     <= target;
          busy     <= 1'b0;
          cnt      <= '0;
          switched <= 1'b1;
        end else begin
          busy <= 1'b1;
          cnt  <= busy ? cnt + 1'b1 : '0;
        end
      end else begin
        vdd_mv <= vdd_of(mod);
        busy   <= 1'b0;
        cnt    <= '0;
      end
    end
  end

endmodule
