// tb_circe_pipe_reg: self-checking test of the id/rd holding register.
// Checks reset to zero, load on enable, and hold without enable, against a
// value tracked in the testbench.
module tb_circe_pipe_reg;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en;
  logic [4:0] d, q, exp;
  int checks = 0, failures = 0;

  circe_pipe_reg #(.WIDTH(5)) dut (.clk_i(clk), .rst_ni(rst_n), .en_i(en), .d_i(d), .q_o(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1'b0; d = 5'h1F;
    @(negedge clk);
    checks++;
    if (q !== 5'd0) begin failures++; $display("FAIL reset q=%h", q); end
    rst_n = 1'b1;
    exp = 5'd0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      en = 1'($urandom_range(0, 1));
      d  = 5'($urandom);
      @(posedge clk);
      if (en) exp = d;
      @(negedge clk);
      checks++;
      if (q !== exp) begin failures++; $display("FAIL q=%h exp=%h", q, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
