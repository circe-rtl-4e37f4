// circe_decoder: the decoder of CIRCE, facing the core's xif-issue-if.
//
// Every instruction the core offloads is presented here with its id and
// source operands. The decoder recognises the five CIRCE instructions
// (encoding in circe_pkg), accepts them with writeback, and rejects
// everything else at once (ready with accept = 0) so the core can raise an
// illegal-instruction trap. For an accepted instruction it enables exactly
// one unit (fp-unit or keccak-unit), passes it the operands and the
// operation, loads the id/rd registers, and sets that unit's bit of `done`.
//
// Handshake (this design's choice; the document gives only the block and
// its signals): a CIRCE instruction is taken in the cycle where
// issue_valid && issue_ready. issue_ready is held low while
//   - a source operand the instruction reads is not yet valid (rs_valid), or
//   - a previous result is still waiting on xif-result-if (`done` set and
//     the committer not taking it this cycle): one instruction in flight.
// Timing: `done` is a register, so a unit's result is offered to the
// committer the cycle after acceptance. Back-to-back issue is possible when
// the committer takes every result at once (one instruction per cycle).
// The commit interface of CV-X-IF is not modelled: accepted instructions
// are treated as committed.
module circe_decoder
  import circe_pkg::*;
(
  input  logic                   clk_i,
  input  logic                   rst_ni,
  // xif-issue-if
  input  logic                   issue_valid_i,
  output logic                   issue_ready_o,
  input  x_issue_req_t           issue_req_i,
  output x_issue_resp_t          issue_resp_o,
  // to the units
  output logic [XLEN-1:0]        rs1_o,
  output logic [XLEN-1:0]        rs2_o,
  output logic [XLEN-1:0]        rs3_o,
  output logic                   fp_en_o,
  output fp_op_e                 fp_op_o,
  output msel_e                  fp_msel_o,
  output logic                   kc_en_o,
  output kc_op_e                 kc_op_o,
  // to the id / rd registers
  output logic                   tag_load_o,
  output logic [ID_WIDTH-1:0]    id_o,
  output logic [4:0]             rd_o,
  // to / from the committer
  output logic [NUM_UNITS-1:0]   done_o,
  input  logic                   result_taken_i
);

  logic [31:0] instr;
  logic [6:0]  opcode;
  logic [2:0]  f3;
  logic        is_circe, is_fp, is_kc;
  logic [NUM_RS-1:0] rs_needed;
  logic        ops_ready;
  logic        busy;
  logic        fire;
  logic [NUM_UNITS-1:0] done_q;

  assign instr  = issue_req_i.instr;
  assign opcode = instr[6:0];
  assign f3     = instr[14:12];

  always_comb begin
    is_fp     = 1'b0;
    is_kc     = 1'b0;
    rs_needed = 3'b111;
    kc_op_o   = KC_ROLLO;
    fp_op_o   = FP_MAC;
    if (opcode == OPC_CUSTOM0) begin
      unique case (f3)
        F3_ROLLO:   begin is_kc = 1'b1; kc_op_o = KC_ROLLO;   end
        F3_ROLHI:   begin is_kc = 1'b1; kc_op_o = KC_ROLHI;   end
        F3_ANDNXOR: begin is_kc = 1'b1; kc_op_o = KC_ANDNXOR; end
        F3_FPMAC:   begin is_fp = 1'b1; fp_op_o = FP_MAC;     end
        F3_FPRED:   begin is_fp = 1'b1; fp_op_o = FP_RED; rs_needed = 3'b001; end
        default: ;
      endcase
    end
  end

  assign is_circe  = is_fp | is_kc;
  assign ops_ready = &(issue_req_i.rs_valid | ~rs_needed);
  assign busy      = (|done_q) & ~result_taken_i;

  assign issue_ready_o = is_circe ? (ops_ready & ~busy) : 1'b1;
  assign issue_resp_o.accept    = is_circe;
  assign issue_resp_o.writeback = is_circe;

  assign fire = issue_valid_i & issue_ready_o & is_circe;

  assign rs1_o     = issue_req_i.rs[0];
  assign rs2_o     = issue_req_i.rs[1];
  assign rs3_o     = issue_req_i.rs[2];
  assign fp_msel_o = msel_e'(instr[26:25]);
  assign fp_en_o   = fire & is_fp;
  assign kc_en_o   = fire & is_kc;

  assign tag_load_o = fire;
  assign id_o       = issue_req_i.id;
  assign rd_o       = instr[11:7];

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      done_q <= '0;
    end else if (fire) begin
      done_q <= '0;
      done_q[UNIT_FP] <= is_fp;
      done_q[UNIT_KC] <= is_kc;
    end else if (result_taken_i) begin
      done_q <= '0;
    end
  end

  assign done_o = done_q;

  // At most one instruction in flight.
  a_done_onehot: assert property (@(posedge clk_i) disable iff (!rst_ni)
    $onehot0(done_q));
  // The committer only takes a result that is there.
  a_taken_needs_done: assert property (@(posedge clk_i) disable iff (!rst_ni)
    result_taken_i |-> (|done_q));

endmodule
