// tb_circe_keccak_unit: self-checking test of the keccak-unit.
// Drives random lanes, offsets and operations, compares the registered
// result with a 64-bit reference rotation and the chi formula, and checks
// that the result register holds while `en` is low. Covers every offset
// 0..63 for both halves.
module tb_circe_keccak_unit;
  import circe_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en;
  kc_op_e op;
  logic [31:0] a, b, c, res;
  int checks = 0, failures = 0;

  circe_keccak_unit dut (
    .clk_i(clk), .rst_ni(rst_n), .en_i(en), .op_i(op),
    .rs1_i(a), .rs2_i(b), .rs3_i(c), .res_o(res)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] rotl(input logic [63:0] v, input int s);
    if (s == 0) return v;
    return (v << s) | (v >> (64 - s));
  endfunction

  function automatic logic [31:0] model(input kc_op_e o, input logic [31:0] x,
                                        input logic [31:0] y, input logic [31:0] z);
    logic [63:0] r;
    r = rotl({y, x}, int'(z[5:0]));
    case (o)
      KC_ROLLO:   return r[31:0];
      KC_ROLHI:   return r[63:32];
      default:    return x ^ (~y & z);
    endcase
  endfunction

  task automatic run(input kc_op_e o, input logic [31:0] x, input logic [31:0] y,
                     input logic [31:0] z);
    logic [31:0] exp;
    exp = model(o, x, y, z);
    @(negedge clk);
    en = 1'b1; op = o; a = x; b = y; c = z;
    @(negedge clk);
    en = 1'b0;
    checks++;
    if (res !== exp) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h c=%h res=%h exp=%h", o, x, y, z, res, exp);
    end
    // The result must hold while en is low and the inputs change.
    a = $urandom; b = $urandom; c = $urandom; op = KC_ANDNXOR;
    @(negedge clk);
    checks++;
    if (res !== exp) begin
      failures++;
      $display("FAIL hold res=%h exp=%h", res, exp);
    end
  endtask

  initial begin
    en = 1'b0; op = KC_ROLLO; a = '0; b = '0; c = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // Known values.
    run(KC_ROLLO, 32'h0000_0001, 32'h8000_0000, 32'd1);   // -> lo = 3
    checks++; if (res !== 32'h0000_0003) failures++;
    run(KC_ROLHI, 32'h8000_0000, 32'h0000_0000, 32'd1);   // -> hi = 1
    checks++; if (res !== 32'h0000_0001) failures++;
    run(KC_ANDNXOR, 32'hF0F0_F0F0, 32'hFF00_FF00, 32'h0FF0_0FF0);
    checks++; if (res !== (32'hF0F0_F0F0 ^ 32'h00F0_00F0)) failures++;
    // Every offset, both halves.
    for (int s = 0; s < 64; s++) begin
      logic [31:0] x, y;
      x = $urandom; y = $urandom;
      run(KC_ROLLO, x, y, 32'(s) | ($urandom & 32'hFFFF_FFC0));
      run(KC_ROLHI, x, y, 32'(s));
    end
    // Random mix.
    for (int i = 0; i < 300; i++) begin
      kc_op_e o;
      o = kc_op_e'($urandom_range(0, 2));
      run(o, $urandom, $urandom, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
