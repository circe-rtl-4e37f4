// circe_pkg: types and constants shared by the CIRCE coprocessor.
//
// CIRCE is a CV-X-IF coprocessor that speeds up the two dominant kernels of
// the CROSS signature scheme: the Keccak-f[1600] permutation (through 32-bit
// rotate-half and and-not-xor instructions) and modular arithmetic over the
// small prime fields of R-SDP and R-SDP(G).
//
// The instruction encoding, the CV-X-IF bundle layout, the id width and the
// moduli table are this design's own choices; the document names the
// operations but gives no encoding. All instructions use the R4 format of
// the custom-0 major opcode:
//   [31:27] rs3  [26:25] f2  [24:20] rs2  [19:15] rs1  [14:12] f3  [11:7] rd
//   [6:0] 7'b0001011
//   f3 = 000  ROLLO   rd = low  half of rotl64({rs2,rs1}, rs3[5:0])
//   f3 = 001  ROLHI   rd = high half of rotl64({rs2,rs1}, rs3[5:0])
//   f3 = 010  ANDNXOR rd = rs1 ^ (~rs2 & rs3)
//   f3 = 100  FPMAC   rd = (rs1[15:0] * rs2[15:0] + rs3) mod m(f2)
//   f3 = 101  FPRED   rd = rs1 mod m(f2)
//   m(f2): 00 -> 127 (p of R-SDP), 01 -> 7 (z of R-SDP),
//          10 -> 509 (p of R-SDP(G)), 11 -> 127 (z of R-SDP(G))
package circe_pkg;

  localparam int unsigned XLEN     = 32;
  localparam int unsigned ID_WIDTH = 4;
  localparam int unsigned NUM_RS   = 3;

  localparam logic [6:0] OPC_CUSTOM0 = 7'b0001011;

  localparam logic [2:0] F3_ROLLO   = 3'b000;
  localparam logic [2:0] F3_ROLHI   = 3'b001;
  localparam logic [2:0] F3_ANDNXOR = 3'b010;
  localparam logic [2:0] F3_FPMAC   = 3'b100;
  localparam logic [2:0] F3_FPRED   = 3'b101;

  // Moduli of the two CROSS variants (p and z of R-SDP and R-SDP(G)).
  localparam int unsigned MOD_P_RSDP  = 127;
  localparam int unsigned MOD_Z_RSDP  = 7;
  localparam int unsigned MOD_P_RSDPG = 509;
  localparam int unsigned MOD_Z_RSDPG = 127;

  typedef enum logic [1:0] {
    KC_ROLLO   = 2'd0,
    KC_ROLHI   = 2'd1,
    KC_ANDNXOR = 2'd2
  } kc_op_e;

  typedef enum logic {
    FP_MAC = 1'b0,
    FP_RED = 1'b1
  } fp_op_e;

  typedef enum logic [1:0] {
    MSEL_P_RSDP  = 2'd0,
    MSEL_Z_RSDP  = 2'd1,
    MSEL_P_RSDPG = 2'd2,
    MSEL_Z_RSDPG = 2'd3
  } msel_e;

  // Unit index, also the bit of the decoder's done vector.
  localparam int unsigned UNIT_FP = 0;
  localparam int unsigned UNIT_KC = 1;
  localparam int unsigned NUM_UNITS = 2;

  // CV-X-IF issue request: instruction with its source operands.
  typedef struct packed {
    logic [31:0]                       instr;
    logic [NUM_RS-1:0][XLEN-1:0]       rs;
    logic [NUM_RS-1:0]                 rs_valid;
    logic [ID_WIDTH-1:0]               id;
  } x_issue_req_t;

  // CV-X-IF issue response, valid in the cycle of the issue handshake.
  typedef struct packed {
    logic accept;
    logic writeback;
  } x_issue_resp_t;

  // CV-X-IF result.
  typedef struct packed {
    logic [ID_WIDTH-1:0] id;
    logic [XLEN-1:0]     data;
    logic [4:0]          rd;
    logic                we;
  } x_result_t;

endpackage
