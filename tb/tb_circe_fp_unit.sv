// tb_circe_fp_unit: self-checking test of the fp-unit.
// Checks FPMAC and FPRED for all four moduli against a reference computed
// with 64-bit integer arithmetic in the testbench, on field-sized operands
// (the common case) and on full-range ones, including the largest
// accumulator values; and checks that the result holds while `en` is low.
module tb_circe_fp_unit;
  import circe_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en;
  fp_op_e op;
  msel_e msel;
  logic [31:0] a, b, c, res;
  int checks = 0, failures = 0;

  circe_fp_unit dut (
    .clk_i(clk), .rst_ni(rst_n), .en_i(en), .op_i(op), .msel_i(msel),
    .rs1_i(a), .rs2_i(b), .rs3_i(c), .res_o(res)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint unsigned modulus(input msel_e m);
    case (m)
      MSEL_P_RSDP:  return 127;
      MSEL_Z_RSDP:  return 7;
      MSEL_P_RSDPG: return 509;
      default:      return 127;
    endcase
  endfunction

  function automatic logic [31:0] model(input fp_op_e o, input msel_e m,
                                        input logic [31:0] x, input logic [31:0] y,
                                        input logic [31:0] z);
    longint unsigned v;
    if (o == FP_MAC) v = longint'(x[15:0]) * longint'(y[15:0]) + longint'(z);
    else             v = longint'(x);
    return 32'(v % modulus(m));
  endfunction

  task automatic run(input fp_op_e o, input msel_e m, input logic [31:0] x,
                     input logic [31:0] y, input logic [31:0] z);
    logic [31:0] exp;
    exp = model(o, m, x, y, z);
    @(negedge clk);
    en = 1'b1; op = o; msel = m; a = x; b = y; c = z;
    @(negedge clk);
    en = 1'b0;
    checks++;
    if (res !== exp) begin
      failures++;
      $display("FAIL op=%0d m=%0d a=%h b=%h c=%h res=%0d exp=%0d", o, m, x, y, z, res, exp);
    end
    a = $urandom; b = $urandom; c = $urandom; msel = msel_e'($urandom_range(0, 3));
    @(negedge clk);
    checks++;
    if (res !== exp) begin
      failures++;
      $display("FAIL hold res=%0d exp=%0d", res, exp);
    end
  endtask

  initial begin
    en = 1'b0; op = FP_MAC; msel = MSEL_P_RSDP; a = '0; b = '0; c = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // Hand-worked values: 126*126+126 = 16002 = 126*127 + 0 -> 0;
    // 508*508+508 = 258572 = 508*509 + 0 -> 0; 100*200+3 = 20003 mod 509 = 152.
    run(FP_MAC, MSEL_P_RSDP, 126, 126, 126);
    checks++; if (res !== 0) failures++;
    run(FP_MAC, MSEL_P_RSDPG, 508, 508, 508);
    checks++; if (res !== 0) failures++;
    run(FP_MAC, MSEL_P_RSDPG, 100, 200, 3);
    checks++; if (res !== 152) failures++;
    run(FP_RED, MSEL_Z_RSDP, 32'hFFFF_FFFF, 0, 0);     // 4294967295 mod 7 = 3
    checks++; if (res !== 3) failures++;
    // Extremes of the accumulator.
    for (int m = 0; m < 4; m++) begin
      run(FP_MAC, msel_e'(m), 32'hFFFF, 32'hFFFF, 32'hFFFF_FFFF);
      run(FP_RED, msel_e'(m), 32'hFFFF_FFFF, 0, 0);
    end
    // Field-sized operands.
    for (int i = 0; i < 400; i++) begin
      msel_e m;
      int unsigned q;
      m = msel_e'($urandom_range(0, 3));
      q = 32'(modulus(m));
      run(fp_op_e'($urandom_range(0, 1)), m, $urandom_range(0, q - 1),
          $urandom_range(0, q - 1), $urandom_range(0, 4 * q));
    end
    // Full-range operands.
    for (int i = 0; i < 400; i++) begin
      run(fp_op_e'($urandom_range(0, 1)), msel_e'($urandom_range(0, 3)),
          $urandom, $urandom, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
