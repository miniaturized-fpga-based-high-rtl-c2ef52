// memory_controller: stores the packed sample stream in the external SRAM.
//
// Words from the shift register are written to consecutive addresses of an
// asynchronous 128K x 16 SRAM (2 Mbit, two million one-bit samples, i.e. a
// 2 us record at 1 ps resolution). The microcontroller reads the record back
// through the control logic, one word per `rd_req`. The original circuit
// gives the memory's size and the controller's role; the SRAM organisation,
// the cycle timing and the rule that a waiting write yields to nothing but a
// read already in progress are this design's own choices.
//
// Write cycle: address and data are driven one clock before `sram_we_n` goes
// low, `sram_we_n` stays low for WE_CYCLES clocks, and address and data are
// held for one clock after it rises (WE_CYCLES + 2 clocks in all). Read cycle:
// `sram_oe_n` low for RD_CYCLES clocks, data captured on the last one;
// `rd_done` pulses with `rd_data` valid. Writes beyond the last address are
// dropped and `full` is set. A new word may arrive while a read runs: it
// waits in a one-word holding register (the word rate is at most one per
// 16 loop times, far below the cycle rate).
module memory_controller #(
  parameter int unsigned AW        = 17,
  parameter int unsigned DW        = 16,
  parameter int unsigned WE_CYCLES = 2,
  parameter int unsigned RD_CYCLES = 2
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          clear,
  input  logic          wr_valid,
  input  logic [DW-1:0] wr_data,
  output logic [AW:0]   wr_count,
  output logic          full,
  input  logic          rd_req,
  input  logic [AW-1:0] rd_addr,
  output logic          rd_done,
  output logic [DW-1:0] rd_data,
  output logic [AW-1:0] sram_addr,
  output logic [DW-1:0] sram_dq_o,
  output logic          sram_dq_oe,
  input  logic [DW-1:0] sram_dq_i,
  output logic          sram_ce_n,
  output logic          sram_oe_n,
  output logic          sram_we_n
);
  typedef enum logic [2:0] {S_IDLE, S_WSETUP, S_WPULSE, S_WHOLD, S_READ} state_e;

  localparam int unsigned TW = $clog2(WE_CYCLES + RD_CYCLES + 1);

  state_e        state;
  logic [TW-1:0] tcnt;
  logic          pend;       // a word waits to be written
  logic [DW-1:0] pend_data;
  logic          rd_pend;
  logic [AW-1:0] rd_pend_addr;

  assign full = wr_count[AW];

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      state      <= S_IDLE;
      tcnt       <= '0;
      pend       <= 1'b0;
      pend_data  <= '0;
      rd_pend    <= 1'b0;
      rd_pend_addr <= '0;
      wr_count   <= '0;
      rd_done    <= 1'b0;
      rd_data    <= '0;
      sram_addr  <= '0;
      sram_dq_o  <= '0;
      sram_dq_oe <= 1'b0;
      sram_ce_n  <= 1'b1;
      sram_oe_n  <= 1'b1;
      sram_we_n  <= 1'b1;
    end else begin
      rd_done <= 1'b0;
      if (wr_valid && !full) begin
        pend      <= 1'b1;
        pend_data <= wr_data;
      end
      if (rd_req) begin
        rd_pend      <= 1'b1;
        rd_pend_addr <= rd_addr;
      end
      unique case (state)
        S_IDLE: begin
          sram_ce_n  <= 1'b1;
          sram_oe_n  <= 1'b1;
          sram_we_n  <= 1'b1;
          sram_dq_oe <= 1'b0;
          if (pend) begin
            pend       <= wr_valid && !full;   // a word arriving now stays pending
            sram_addr  <= wr_count[AW-1:0];
            sram_dq_o  <= pend_data;
            sram_dq_oe <= 1'b1;
            sram_ce_n  <= 1'b0;
            state      <= S_WSETUP;
          end else if (rd_pend) begin
            rd_pend   <= rd_req;
            sram_addr <= rd_pend_addr;
            sram_ce_n <= 1'b0;
            sram_oe_n <= 1'b0;
            tcnt      <= TW'(RD_CYCLES - 1);
            state     <= S_READ;
          end
        end
        S_WSETUP: begin
          sram_we_n <= 1'b0;
          tcnt      <= TW'(WE_CYCLES - 1);
          state     <= S_WPULSE;
        end
        S_WPULSE: begin
          if (tcnt == '0) begin
            sram_we_n <= 1'b1;
            wr_count  <= wr_count + 1'b1;
            state     <= S_WHOLD;
          end else begin
            tcnt <= tcnt - TW'(1);
          end
        end
        S_WHOLD: begin
          sram_dq_oe <= 1'b0;
          sram_ce_n  <= 1'b1;
          state      <= S_IDLE;
        end
        S_READ: begin
          if (tcnt == '0) begin
            rd_data   <= sram_dq_i;
            rd_done   <= 1'b1;
            sram_oe_n <= 1'b1;
            sram_ce_n <= 1'b1;
            state     <= S_IDLE;
          end else begin
            tcnt <= tcnt - TW'(1);
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The SRAM must never see a write while its outputs are enabled.
  a_no_bus_fight: assert property (@(posedge clk) disable iff (rst)
                                   !(!sram_we_n && !sram_oe_n));
  a_drive_on_write: assert property (@(posedge clk) disable iff (rst)
                                     !sram_we_n |-> sram_dq_oe);
endmodule
