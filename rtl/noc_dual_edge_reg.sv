// noc_dual_edge_reg: a W-bit register that loads d on both the rising and the
// falling clock edge, so the network advances one step per clock half period.
//
// Built from two ordinary flip-flop banks, one on each edge, and an XOR:
//   rising edge:  qp <= d ^ qn      falling edge:  qn <= d ^ qp
//   q = qp ^ qn
// After either edge q equals the d sampled at that edge, and q never depends on
// the clock level, so no clock signal is used as data. Asynchronous active-low
// reset clears both banks (q = 0).
// Operating on both edges follows the described network; the XOR structure and
// the reset are this design's own choices.
module noc_dual_edge_reg #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] qp, qn;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) qp <= '0;
    else        qp <= d ^ qn;
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) qn <= '0;
    else        qn <= d ^ qp;
  end

  assign q = qp ^ qn;

endmodule
