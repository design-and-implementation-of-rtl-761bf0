// noc_rr_arbiter: combinational round-robin arbiter for N requesters.
//
// Requester ptr has the highest priority, then ptr+1, ... wrapping around. The
// caller keeps ptr in a register and moves it to one past the winner after each
// grant, so every requester is served within N grants. gnt is one-hot (or zero
// when nothing is requested). The arbitration scheme is this design's own choice:
// the described node does not say how simultaneous packets share an output.
module noc_rr_arbiter #(
  parameter int unsigned N = 5
) (
  input  logic [N-1:0]         req,
  input  logic [$clog2(N)-1:0] ptr,
  output logic [N-1:0]         gnt,
  output logic [$clog2(N)-1:0] gnt_idx,
  output logic                 any
);

  always_comb begin
    gnt     = '0;
    gnt_idx = '0;
    any     = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      logic [$clog2(N)-1:0] idx;
      idx = $clog2(N)'((32'(ptr) + k) % N);
      if (!any && req[idx]) begin
        any      = 1'b1;
        gnt[idx] = 1'b1;
        gnt_idx  = idx;
      end
    end
  end

endmodule
