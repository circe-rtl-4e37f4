// circe_fp_unit: the fp-unit of CIRCE, modular arithmetic for CROSS.
//
// CROSS computes syndromes and restricted vectors with small moduli: p and
// z of R-SDP (127 and 7) and of R-SDP(G) (509 and 127). The unit offers a
// reduced multiply-accumulate and a reduction, and picks the modulus per
// instruction, so the same hardware serves both variants:
//   FPMAC  res = (rs1[15:0] * rs2[15:0] + rs3) mod m
//   FPRED  res = rs1 mod m
// The document says only that the unit provides multiply-accumulate and
// reduction instructions over the field; the operand widths (16-bit factors,
// 32-bit accumulator), the per-instruction modulus select and the moduli
// table (taken from the CROSS specification) are this design's choices.
// The reduction is a constant-divisor remainder per modulus followed by a
// 4-way select, left to synthesis to map.
//
// Timing: combinational, registered when `en` is high; `res` is valid from
// the next cycle and holds until the next accepted instruction.
module circe_fp_unit
  import circe_pkg::*;
(
  input  logic            clk_i,
  input  logic            rst_ni,
  input  logic            en_i,
  input  fp_op_e          op_i,
  input  msel_e           msel_i,
  input  logic [XLEN-1:0] rs1_i,
  input  logic [XLEN-1:0] rs2_i,
  input  logic [XLEN-1:0] rs3_i,
  output logic [XLEN-1:0] res_o
);

  logic [31:0] prod;
  logic [32:0] sum;     // rs1*rs2 + rs3 needs 33 bits
  logic [32:0] x;       // value to reduce
  logic [8:0]  r_p1, r_z1, r_p2, r_z2; // every modulus is below 2^9
  logic [XLEN-1:0] res_d;

  assign prod = rs1_i[15:0] * rs2_i[15:0];
  assign sum  = {1'b0, prod} + {1'b0, rs3_i};
  assign x    = (op_i == FP_MAC) ? sum : {1'b0, rs1_i};

  assign r_p1 = 9'(x % 33'(MOD_P_RSDP));
  assign r_z1 = 9'(x % 33'(MOD_Z_RSDP));
  assign r_p2 = 9'(x % 33'(MOD_P_RSDPG));
  assign r_z2 = 9'(x % 33'(MOD_Z_RSDPG));

  always_comb begin
    unique case (msel_i)
      MSEL_P_RSDP:  res_d = {23'b0, r_p1};
      MSEL_Z_RSDP:  res_d = {23'b0, r_z1};
      MSEL_P_RSDPG: res_d = {23'b0, r_p2};
      MSEL_Z_RSDPG: res_d = {23'b0, r_z2};
      default:      res_d = '0;
    endcase
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)   res_o <= '0;
    else if (en_i) res_o <= res_d;
  end

endmodule
