// line_bram: simple dual-port, single-clock memory with buffered output,
// one element of the r-line buffer.
//
// Write port: data_in is stored at write_addr on every rising edge. Read
// port: read_addr is registered, and the word it selects is registered
// again on the output, so data_out shows the word addressed two ticks
// earlier. A read and a write to the same address in the same tick return
// the old word. The structure (dual port, one clock, output register) is
// that of the source design; the two-tick read latency is how this design
// realises it.
module line_bram #(
  parameter int unsigned DW    = 32,
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic [DW-1:0] data_in,
  input  logic [AW-1:0] write_addr,
  input  logic [AW-1:0] read_addr,
  output logic [DW-1:0] data_out
);

  logic [DW-1:0] mem [DEPTH];
  logic [AW-1:0] raddr_q;

  always_ff @(posedge clk) begin
    mem[write_addr] <= data_in;
    raddr_q         <= read_addr;
    data_out        <= mem[raddr_q];
  end

endmodule
