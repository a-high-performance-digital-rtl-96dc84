// dual_port_ram: on-chip RAM shared by the control and communication processors.
//
// Both processors keep the main control parameters here and read them without
// any interrupt or lock. Write conflicts are ruled out by ownership: the lower
// half of the address space can only be written through port A (control
// processor), the upper half only through port B (communication processor).
// Either port can read the whole RAM. A write to the other processor's half is
// dropped and a_wr_denied / b_wr_denied is pulsed in the next cycle. Since no
// address has two writers, the two ports never write the same word.
//
// Reads have one cycle of latency (synchronous RAM). The RAM size, the split at
// the middle and the denied-write flag are this design's choices.
module dual_port_ram #(
  parameter int AW = 10,
  parameter int DW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  // port A: control processor, owns the lower half
  input  logic [AW-1:0] a_addr,
  input  logic          a_we,
  input  logic [DW-1:0] a_wdata,
  output logic [DW-1:0] a_rdata,
  output logic          a_wr_denied,
  // port B: communication processor, owns the upper half
  input  logic [AW-1:0] b_addr,
  input  logic          b_we,
  input  logic [DW-1:0] b_wdata,
  output logic [DW-1:0] b_rdata,
  output logic          b_wr_denied
);

  logic [DW-1:0] mem [2**AW];
  logic a_ok, b_ok;

  assign a_ok = a_we && !a_addr[AW-1];
  assign b_ok = b_we &&  b_addr[AW-1];

  always_ff @(posedge clk) begin
    if (a_ok) mem[a_addr] <= a_wdata;
    a_rdata <= mem[a_addr];
  end

  always_ff @(posedge clk) begin
    if (b_ok) mem[b_addr] <= b_wdata;
    b_rdata <= mem[b_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_wr_denied <= 1'b0;
      b_wr_denied <= 1'b0;
    end else begin
      a_wr_denied <= a_we && a_addr[AW-1];
      b_wr_denied <= b_we && !b_addr[AW-1];
    end
  end

  // The ownership split guarantees the ports never write one word together.
  assert property (@(posedge clk) disable iff (!rst_n) !(a_ok && b_ok && a_addr == b_addr));

endmodule
