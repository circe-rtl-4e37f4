// circe_committer: the committer of CIRCE, facing the core's xif-result-if.
//
// When the decoder's `done` shows that a unit has finished, the committer
// offers that unit's result on xif-result-if, tagged with the id and rd
// held in the REG boxes, with write-enable set. It keeps the result valid
// and stable until the core takes it (result_valid && result_ready) and
// reports the handshake back to the decoder as `result_taken`, which frees
// the datapath for the next instruction. The valid/ready handshake and
// the one-hot `done` vector are this design's choices; the document draws
// the block and its inputs only.
//
// Timing: purely combinational; the registers it reads are in the units,
// the decoder and the REG boxes.
module circe_committer
  import circe_pkg::*;
(
  input  logic                 clk_i,
  input  logic                 rst_ni,
  input  logic [NUM_UNITS-1:0] done_i,
  input  logic [XLEN-1:0]      fp_res_i,
  input  logic [XLEN-1:0]      kc_res_i,
  input  logic [ID_WIDTH-1:0]  id_i,
  input  logic [4:0]           rd_i,
  // xif-result-if
  output logic                 result_valid_o,
  input  logic                 result_ready_i,
  output x_result_t            result_o,
  // to the decoder
  output logic                 result_taken_o
);

  assign result_valid_o = |done_i;
  assign result_o.id    = id_i;
  assign result_o.rd    = rd_i;
  assign result_o.we    = |done_i;
  assign result_o.data  = done_i[UNIT_KC] ? kc_res_i :
                          done_i[UNIT_FP] ? fp_res_i : '0;
  assign result_taken_o = result_valid_o & result_ready_i;

  // A result offered and not taken stays the same until it is taken.
  a_result_stable: assert property (@(posedge clk_i) disable iff (!rst_ni)
    (result_valid_o && !result_ready_i) |=> (result_valid_o && $stable(result_o)));

endmodule
