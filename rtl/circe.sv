// circe: CROSS Integrated RISC-V Cryptographic Extension (top).
//
// A tightly coupled coprocessor that attaches to a 32-bit RISC-V core
// through the CV-X-IF issue and result interfaces and executes five custom
// instructions for the CROSS post-quantum signature: three for the
// Keccak-f[1600] permutation (ROLLO, ROLHI, ANDNXOR) and two for modular
// arithmetic (FPMAC, FPRED) over the moduli of R-SDP and R-SDP(G).
//
// Structure, following the document's block diagram: the decoder takes the
// offloaded instruction and its operands rs1/rs2/rs3 and enables the
// fp-unit or the keccak-unit; two registers hold the instruction's id and
// rd; the decoder's done tells the committer which unit's result to return
// on xif-result-if.
//
// Timing: an instruction accepted in cycle t has its result offered in
// cycle t+1 and held until result_ready. One instruction is in flight at a
// time; with result_ready held high one instruction is executed per cycle.
// Ports are the CV-X-IF bundles as packed structs (see circe_pkg).
module circe
  import circe_pkg::*;
(
  input  logic          clk_i,
  input  logic          rst_ni,
  // xif-issue-if
  input  logic          issue_valid_i,
  output logic          issue_ready_o,
  input  x_issue_req_t  issue_req_i,
  output x_issue_resp_t issue_resp_o,
  // xif-result-if
  output logic          result_valid_o,
  input  logic          result_ready_i,
  output x_result_t     result_o
);

  logic [XLEN-1:0]      rs1, rs2, rs3;
  logic                 fp_en, kc_en;
  fp_op_e               fp_op;
  msel_e                fp_msel;
  kc_op_e               kc_op;
  logic                 tag_load;
  logic [ID_WIDTH-1:0]  id_d, id_q;
  logic [4:0]           rd_d, rd_q;
  logic [NUM_UNITS-1:0] done;
  logic                 result_taken;
  logic [XLEN-1:0]      fp_res, kc_res;

  circe_decoder u_decoder (
    .clk_i, .rst_ni,
    .issue_valid_i, .issue_ready_o, .issue_req_i, .issue_resp_o,
    .rs1_o(rs1), .rs2_o(rs2), .rs3_o(rs3),
    .fp_en_o(fp_en), .fp_op_o(fp_op), .fp_msel_o(fp_msel),
    .kc_en_o(kc_en), .kc_op_o(kc_op),
    .tag_load_o(tag_load), .id_o(id_d), .rd_o(rd_d),
    .done_o(done), .result_taken_i(result_taken)
  );

  circe_fp_unit u_fp_unit (
    .clk_i, .rst_ni, .en_i(fp_en), .op_i(fp_op), .msel_i(fp_msel),
    .rs1_i(rs1), .rs2_i(rs2), .rs3_i(rs3), .res_o(fp_res)
  );

  circe_keccak_unit u_keccak_unit (
    .clk_i, .rst_ni, .en_i(kc_en), .op_i(kc_op),
    .rs1_i(rs1), .rs2_i(rs2), .rs3_i(rs3), .res_o(kc_res)
  );

  circe_pipe_reg #(.WIDTH(ID_WIDTH)) u_id_reg (
    .clk_i, .rst_ni, .en_i(tag_load), .d_i(id_d), .q_o(id_q)
  );

  circe_pipe_reg #(.WIDTH(5)) u_rd_reg (
    .clk_i, .rst_ni, .en_i(tag_load), .d_i(rd_d), .q_o(rd_q)
  );

  circe_committer u_committer (
    .clk_i, .rst_ni, .done_i(done), .fp_res_i(fp_res), .kc_res_i(kc_res),
    .id_i(id_q), .rd_i(rd_q),
    .result_valid_o, .result_ready_i, .result_o,
    .result_taken_o(result_taken)
  );

endmodule
