// circe_keccak_unit: the keccak-unit of CIRCE.
//
// Keccak-f[1600] works on 64-bit lanes, which a 32-bit core must keep as two
// 32-bit halves. The unit offers the three operations that dominate the
// permutation in software:
//   ROLLO   res = low  32 bits of rotl64({rs2,rs1}, rs3[5:0])
//   ROLHI   res = high 32 bits of rotl64({rs2,rs1}, rs3[5:0])
//   ANDNXOR res = rs1 ^ (~rs2 & rs3)        (the chi step)
// rs1 holds the low half of the lane and rs2 the high half; the rotation
// offset comes in the third register, as the document describes. Which
// operand carries which half, and the use of only offset bits [5:0], are
// this design's choices.
//
// Timing: the result is computed combinationally and registered when `en`
// is high (the cycle the decoder accepts an instruction for this unit), so
// `res` is valid from the next cycle and holds until the next accepted
// instruction. Reset clears the register.
module circe_keccak_unit
  import circe_pkg::*;
(
  input  logic            clk_i,
  input  logic            rst_ni,
  input  logic            en_i,
  input  kc_op_e          op_i,
  input  logic [XLEN-1:0] rs1_i,
  input  logic [XLEN-1:0] rs2_i,
  input  logic [XLEN-1:0] rs3_i,
  output logic [XLEN-1:0] res_o
);

  logic [63:0]     lane;
  logic [127:0]    lane_dbl;
  logic [63:0]     lane_rot;
  logic [5:0]      offset;
  logic [XLEN-1:0] res_d;

  assign lane     = {rs2_i, rs1_i};
  assign offset   = rs3_i[5:0];
  // Rotate left by shifting a doubled copy of the lane.
  assign lane_dbl = {lane, lane} << offset;
  assign lane_rot = lane_dbl[127:64];

  always_comb begin
    unique case (op_i)
      KC_ROLLO:   res_d = lane_rot[31:0];
      KC_ROLHI:   res_d = lane_rot[63:32];
      KC_ANDNXOR: res_d = rs1_i ^ (~rs2_i & rs3_i);
      default:    res_d = '0;
    endcase
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)   res_o <= '0;
    else if (en_i) res_o <= res_d;
  end

endmodule
