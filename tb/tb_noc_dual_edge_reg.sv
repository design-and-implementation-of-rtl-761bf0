// tb_noc_dual_edge_reg: checks that the register follows d at every rising and
// every falling clock edge, holds between edges and clears on reset.
// d is changed a quarter period after each edge; q is compared one time unit
// after the edge with the value d had at the edge.
module tb_noc_dual_edge_reg;
  localparam int W = 16;
  localparam time HALF = 5;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] d = '0, q;
  logic [W-1:0] d_at_edge;
  int checks = 0, failures = 0, edges = 0;

  noc_dual_edge_reg #(.W(W)) dut (.clk, .rst_n, .d, .q);

  always #HALF clk = ~clk;

  initial begin
    d = 16'hA5A5;
    #(3 * HALF + 2);
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset: q=%h", q); end
    rst_n = 1'b1;
    repeat (400) begin
      @(clk);                       // any edge
      d_at_edge = d;
      edges++;
      #1;
      checks++;
      if (q !== d_at_edge) begin
        failures++;
        $display("FAIL edge %0d (clk=%0b): q=%h expected %h", edges, clk, q, d_at_edge);
      end
      #(HALF / 2) d = W'($urandom);
      #1;
      checks++;                     // no change between edges
      if (q !== d_at_edge) begin failures++; $display("FAIL hold: q=%h", q); end
    end
    // asynchronous reset in the middle of a half period
    #1 rst_n = 1'b0;
    #1;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL async reset: q=%h", q); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
