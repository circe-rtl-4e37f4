// tb_circe_decoder: self-checking test of the CIRCE decoder.
// Plays the core on xif-issue-if and the committer on result_taken. Checks,
// against an encoding table written out in the testbench: accept/reject of
// CIRCE and foreign instructions, which unit is enabled with which
// operation and modulus, operand and tag pass-through, the registered done
// vector, the wait for missing operands, the stall while a result is
// pending, and back-to-back issue when the result is taken.
module tb_circe_decoder;
  import circe_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic issue_valid, issue_ready;
  x_issue_req_t req;
  x_issue_resp_t resp;
  logic [31:0] rs1, rs2, rs3;
  logic fp_en, kc_en, tag_load, taken;
  fp_op_e fp_op;
  msel_e fp_msel;
  kc_op_e kc_op;
  logic [ID_WIDTH-1:0] id;
  logic [4:0] rd;
  logic [NUM_UNITS-1:0] done;
  int checks = 0, failures = 0;

  circe_decoder dut (
    .clk_i(clk), .rst_ni(rst_n),
    .issue_valid_i(issue_valid), .issue_ready_o(issue_ready),
    .issue_req_i(req), .issue_resp_o(resp),
    .rs1_o(rs1), .rs2_o(rs2), .rs3_o(rs3),
    .fp_en_o(fp_en), .fp_op_o(fp_op), .fp_msel_o(fp_msel),
    .kc_en_o(kc_en), .kc_op_o(kc_op),
    .tag_load_o(tag_load), .id_o(id), .rd_o(rd),
    .done_o(done), .result_taken_i(taken)
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
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  function automatic logic [31:0] enc(input logic [2:0] f3, input logic [1:0] f2,
                                      input logic [4:0] rdi);
    // rs3=3, rs2=2, rs1=1 in the register fields.
    return {5'd3, f2, 5'd2, 5'd1, f3, rdi, 7'b0001011};
  endfunction

  task automatic drive(input logic [31:0] instr, input logic [2:0] rsv,
                       input logic [ID_WIDTH-1:0] i);
    req.instr    = instr;
    req.rs[0]    = $urandom;
    req.rs[1]    = $urandom;
    req.rs[2]    = $urandom;
    req.rs_valid = rsv;
    req.id       = i;
    issue_valid  = 1'b1;
  endtask

  // Expected decode of one CIRCE instruction.
  typedef struct {
    logic [2:0] f3;
    logic       fp;
    int         op;
    logic [2:0] needs;
  } dec_t;
  dec_t table_[5];

  initial begin
    table_[0] = '{3'b000, 1'b0, 0, 3'b111};
    table_[1] = '{3'b001, 1'b0, 1, 3'b111};
    table_[2] = '{3'b010, 1'b0, 2, 3'b111};
    table_[3] = '{3'b100, 1'b1, 0, 3'b111};
    table_[4] = '{3'b101, 1'b1, 1, 3'b001};

    issue_valid = 1'b0; taken = 1'b0; req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(done == '0, "done clear after reset");

    // Foreign instructions: addi, custom-0 with unused f3, custom-1.
    begin
      logic [31:0] foreign[3];
      foreign[0] = 32'h0010_0093;                  // addi x1,x0,1
      foreign[1] = enc(3'b011, 2'b00, 5'd4);
      foreign[2] = enc(3'b000, 2'b00, 5'd4) | 32'h0000_0020; // custom-1
      for (int k = 0; k < 3; k++) begin
        drive(foreign[k], 3'b111, 4'd9);
        #1;
        check(issue_ready === 1'b1, "foreign ready");
        check(resp.accept === 1'b0 && resp.writeback === 1'b0, "foreign rejected");
        check(!fp_en && !kc_en && !tag_load, "foreign enables nothing");
        @(negedge clk);
        check(done == '0, "foreign sets no done");
      end
      issue_valid = 1'b0;
    end

    // Every CIRCE instruction, every modulus select, random tags.
    for (int rep = 0; rep < 40; rep++) begin
      for (int k = 0; k < 5; k++) begin
        logic [1:0] f2;
        logic [4:0] rdi;
        logic [ID_WIDTH-1:0] idi;
        logic [2:0] partial;
        f2 = 2'($urandom); rdi = 5'($urandom); idi = ID_WIDTH'($urandom);
        // First with one needed operand missing: must wait.
        partial = table_[k].needs & ~(3'b001 << $urandom_range(0, 2));
        if (partial != table_[k].needs) begin
          drive(enc(table_[k].f3, f2, rdi), partial | ~table_[k].needs & 3'($urandom), idi);
          #1;
          check(issue_ready === 1'b0, "waits for operand");
          check(resp.accept === 1'b1, "accept shown while waiting");
          check(!fp_en && !kc_en && !tag_load, "nothing enabled while waiting");
          @(negedge clk);
          check(done == '0, "no done while waiting");
        end
        // Operands valid (only the needed ones for FPRED).
        drive(enc(table_[k].f3, f2, rdi), table_[k].needs, idi);
        #1;
        check(issue_ready === 1'b1, "ready with operands");
        check(resp.accept === 1'b1 && resp.writeback === 1'b1, "accepted");
        check(fp_en === table_[k].fp && kc_en === !table_[k].fp, "unit enable");
        check(tag_load === 1'b1, "tag load");
        check(rs1 === req.rs[0] && rs2 === req.rs[1] && rs3 === req.rs[2], "operands");
        check(id === idi && rd === rdi, "tags");
        if (table_[k].fp) check(int'(fp_op) == table_[k].op && fp_msel === msel_e'(f2), "fp op");
        else              check(int'(kc_op) == table_[k].op, "kc op");
        @(negedge clk);
        issue_valid = 1'b0;
        #1;
        check(done === (table_[k].fp ? 2'b01 : 2'b10), "done after one cycle");
        // Stall: the next instruction waits while the result is not taken.
        drive(enc(3'b010, 2'b00, 5'd7), 3'b111, 4'd1);
        #1;
        check(issue_ready === 1'b0, "stall while result pending");
        check(!fp_en && !kc_en, "no enable while stalled");
        @(negedge clk);
        check(done === (table_[k].fp ? 2'b01 : 2'b10), "done held while pending");
        issue_valid = 1'b0;
        if (rep % 2 == 0) begin
          // Result taken with no new instruction: done clears.
          taken = 1'b1;
          @(negedge clk);
          taken = 1'b0;
          #1;
          check(done === 2'b00, "done clears when taken");
        end else begin
          // Result taken while the next instruction issues: back-to-back.
          taken = 1'b1;
          drive(enc(3'b100, 2'b00, 5'd7), 3'b111, 4'd1);
          #1;
          check(issue_ready === 1'b1 && fp_en === 1'b1, "back-to-back issue");
          @(negedge clk);
          taken = 1'b0; issue_valid = 1'b0;
          #1;
          check(done === 2'b01, "new done after back-to-back");
          taken = 1'b1;
          @(negedge clk);
          taken = 1'b0;
          check(done === 2'b00, "done clears");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
