// sync_edge: two-flop synchroniser with rising-edge detection.
//
// Brings a signal from another clock domain or from an optical receiver into
// the clock domain, and gives a one-cycle pulse on each rising edge. Latency
// from the input edge to rise is two to three clock edges. A helper used wherever an
// external trigger or sync line enters the logic.
module sync_edge (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic rise
);

  logic [2:0] s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s <= '0;
    else        s <= {s[1:0], d};
  end

  assign rise = s[1] && !s[2];

endmodule
