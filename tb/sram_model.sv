// sram_model: behavioural model of an asynchronous SRAM (default 128K x 16,
// 2 Mbit) for simulation only. Writes happen on the rising edge of we_n
// (while ce_n is low) with the data present on dq_in; reads return the
// addressed word on dq_out while ce_n and oe_n are low. It flags a
// write pulse shorter than MIN_WE_PS and a write with oe_n low. The array
// starts cleared.
module sram_model #(
  parameter int AW        = 17,
  parameter int DW        = 16,
  parameter int MIN_WE_PS = 30000
) (
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] dq_in,
  output logic [DW-1:0] dq_out,
  input  logic          ce_n,
  input  logic          oe_n,
  input  logic          we_n,
  output int            violations,
  output int            writes
);
  logic [DW-1:0] mem [1 << AW];
  realtime       we_fall;

  initial begin
    foreach (mem[i]) mem[i] = '0;
    violations = 0;
    writes     = 0;
    we_fall    = 0;
  end

  always @(negedge we_n) begin
    we_fall = $realtime;
    if (!oe_n) violations++;
  end

  always @(posedge we_n) if (!ce_n) begin
    if ($realtime - we_fall < MIN_WE_PS * 1ps) violations++;
    mem[addr] = dq_in;
    writes++;
  end

  assign dq_out = (!ce_n && !oe_n) ? mem[addr] : '0;
endmodule
