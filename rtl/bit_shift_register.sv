// bit_shift_register: packs the one-bit delta-modulation stream into words.
//
// Each sample of the delta modulator is a single bit q. This shift register
// collects W of them (16 by default) and hands a full word to the memory
// controller. The first sample of a word lands in bit 0. `flush` emits a
// partly filled word, zero-padded, at the end of a record; `clear` drops it.
// The original circuit names a shift register between the comparator output
// and the memory controller; width, bit order and flush are this design's
// own choices.
//
// Timing: one bit per `bit_valid` cycle; `word_valid` pulses for one cycle on
// the edge that stores the W-th bit (or on the edge after `flush` when bits are
// pending). Bits may arrive every cycle.
module bit_shift_register #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         clear,
  input  logic         bit_valid,
  input  logic         bit_in,
  input  logic         flush,
  output logic         word_valid,
  output logic [W-1:0] word
);
  localparam int unsigned CW = $clog2(W + 1);

  logic [W-1:0]  sr;
  logic [CW-1:0] n;

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      sr         <= '0;
      n          <= '0;
      word_valid <= 1'b0;
      word       <= '0;
    end else begin
      word_valid <= 1'b0;
      if (bit_valid) begin
        if (n == CW'(W - 1)) begin
          word       <= {bit_in, sr[W-1:1]};
          word_valid <= 1'b1;
          sr         <= '0;
          n          <= '0;
        end else begin
          sr <= {bit_in, sr[W-1:1]};
          n  <= n + CW'(1);
        end
      end else if (flush && n != '0) begin
        // Shift the pending bits down so the first one sits in bit 0.
        word       <= sr >> (W - 32'(n));
        word_valid <= 1'b1;
        sr         <= '0;
        n          <= '0;
      end
    end
  end
endmodule
