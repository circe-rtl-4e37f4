// tb_circe_committer: self-checking test of the committer.
// Drives done, unit results and tags at random and checks the result
// bundle on xif-result-if: valid, write-enable, the data of the unit named
// by done, id and rd, and result_taken = valid && ready.
module tb_circe_committer;
  import circe_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [NUM_UNITS-1:0] done;
  logic [31:0] fp_res, kc_res;
  logic [ID_WIDTH-1:0] id;
  logic [4:0] rd;
  logic valid, ready, taken;
  x_result_t res;
  int checks = 0, failures = 0;

  circe_committer dut (
    .clk_i(clk), .rst_ni(rst_n), .done_i(done), .fp_res_i(fp_res), .kc_res_i(kc_res),
    .id_i(id), .rd_i(rd), .result_valid_o(valid), .result_ready_i(ready),
    .result_o(res), .result_taken_o(taken)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s done=%b", what, done);
    end
  endtask

  initial begin
    done = '0; fp_res = '0; kc_res = '0; id = '0; rd = '0; ready = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      // Hold the bundle stable while a result waits, as the decoder does.
      if (!(valid && !ready)) begin
        case ($urandom_range(0, 2))
          0: done = 2'b00;
          1: done = 2'b01;
          default: done = 2'b10;
        endcase
        fp_res = $urandom; kc_res = $urandom;
        id = ID_WIDTH'($urandom); rd = 5'($urandom);
      end
      ready = 1'($urandom_range(0, 1));
      #1;
      check(valid === (done != 2'b00), "valid");
      check(res.we === (done != 2'b00), "we");
      check(taken === (valid && ready), "taken");
      if (done != 2'b00) begin
        check(res.data === (done[UNIT_KC] ? kc_res : fp_res), "data select");
        check(res.id === id && res.rd === rd, "tags");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
