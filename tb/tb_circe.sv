// tb_circe: end-to-end test of the CIRCE coprocessor at its default size.
//
// The testbench plays a 32-bit RISC-V core on CV-X-IF and runs, through
// CIRCE's custom instructions, the two kernel families the extension is
// built for:
//   1. Keccak-f[1600] in 32-bit software form: theta's rotations, rho/pi
//      and chi are executed with ROLLO/ROLHI/ANDNXOR, the XORs of theta and
//      iota in the "core". It runs on the all-zero state (checked against
//      the published first lane 0xF1258F7940E1DDE7) and on a random state,
//      and every lane is compared with a 64-bit reference permutation
//      written in the testbench.
//   2. Syndrome-style dot products with FPMAC for R-SDP (p = 127) and
//      R-SDP(G) (p = 509), exponent additions modulo z (7 and 127), and
//      FPRED on random words, compared with integer arithmetic.
// The core side inserts random gaps, late operands, foreign instructions
// and result back-pressure. The testbench counts each mechanism of the
// design (rejection, operand wait, stall on a pending result, back-to-back
// issue, back-pressure, each operation and modulus) and fails if one never
// happened. It also checks the one-cycle latency from issue to result.
module tb_circe;
  import circe_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic issue_valid, issue_ready;
  x_issue_req_t req;
  x_issue_resp_t resp;
  logic result_valid, result_ready;
  x_result_t result;
  int checks = 0, failures = 0;
  longint unsigned cycle = 0;

  circe dut (
    .clk_i(clk), .rst_ni(rst_n),
    .issue_valid_i(issue_valid), .issue_ready_o(issue_ready),
    .issue_req_i(req), .issue_resp_o(resp),
    .result_valid_o(result_valid), .result_ready_i(result_ready),
    .result_o(result)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cycle);
    end
  endtask

  // ---------------------------------------------------------------------
  // Mechanism counters and protocol monitor
  // ---------------------------------------------------------------------
  int n_reject = 0, n_opwait = 0, n_stall = 0, n_b2b = 0, n_backpressure = 0;
  int n_kc[3] = '{0, 0, 0};
  int n_fpop[2] = '{0, 0};
  int n_msel[4] = '{0, 0, 0, 0};
  logic prev_fire = 1'b0;
  int fire_cnt = 0;       // handshakes seen by the monitor
  int cur_seq = 0;        // batch index of the instruction on the bus
  logic cur_foreign = 1'b0;

  // Expected tags of the accepted instructions, in order.
  typedef struct { int seq; logic [ID_WIDTH-1:0] id; logic [4:0] rd; } tag_t;
  tag_t exp_q[$];
  logic [31:0] res_mem[256];
  int n_results = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      cycle++;
      if (prev_fire) check(result_valid === 1'b1, "result one cycle after issue");
      prev_fire <= issue_valid && issue_ready && resp.accept;
      if (issue_valid && !issue_ready) begin
        if (result_valid) n_stall++;
        if (req.instr[14:12] == F3_FPRED ? !req.rs_valid[0] : (req.rs_valid != 3'b111))
          n_opwait++;
      end
      if (issue_valid && issue_ready) begin
        fire_cnt <= fire_cnt + 1;
        if (cur_foreign) begin
          check(resp.accept === 1'b0 && resp.writeback === 1'b0, "foreign rejected");
          n_reject++;
        end else begin
          check(resp.accept === 1'b1 && resp.writeback === 1'b1, "CIRCE accepted");
          exp_q.push_back('{cur_seq, req.id, req.instr[11:7]});
          case (req.instr[14:12])
            F3_ROLLO:   n_kc[0]++;
            F3_ROLHI:   n_kc[1]++;
            F3_ANDNXOR: n_kc[2]++;
            F3_FPMAC:   begin n_fpop[0]++; n_msel[req.instr[26:25]]++; end
            F3_FPRED:   begin n_fpop[1]++; n_msel[req.instr[26:25]]++; end
            default: ;
          endcase
          if (result_valid && result_ready) n_b2b++;
        end
      end
      if (result_valid && !result_ready) n_backpressure++;
      if (result_valid && result_ready) begin
        tag_t t;
        check(exp_q.size() > 0, "result without instruction");
        if (exp_q.size() > 0) begin
          t = exp_q.pop_front();
          check(result.id === t.id && result.rd === t.rd && result.we === 1'b1, "result tags");
          res_mem[t.seq] = result.data;
          n_results++;
        end
      end
    end
  end

  // Random back-pressure from the core's write-back stage.
  always @(negedge clk) result_ready <= ($urandom_range(0, 3) != 0);

  // ---------------------------------------------------------------------
  // Core side: issue a batch of independent instructions, collect results
  // ---------------------------------------------------------------------
  logic [31:0] b_instr[256];
  logic [31:0] b_a[256], b_b[256], b_c[256];
  logic [ID_WIDTH-1:0] next_id = '0;

  function automatic logic [31:0] enc(input logic [2:0] f3, input logic [1:0] f2,
                                      input logic [4:0] rd);
    return {5'd12, f2, 5'd11, 5'd10, f3, rd, OPC_CUSTOM0};
  endfunction

  // Called at a negative clock edge; returns at a negative clock edge
  // with issue_valid low.
  task automatic issue_one(input logic [31:0] instr, input logic [31:0] a,
                           input logic [31:0] b, input logic [31:0] c,
                           input int seq, input logic foreign);
    logic [2:0] late;
    int start;
    req.instr = instr;
    req.rs[0] = a; req.rs[1] = b; req.rs[2] = c;
    req.id = next_id;
    cur_seq = seq;
    cur_foreign = foreign;
    // Sometimes an operand arrives late (forwarded from the core's pipeline).
    late = ($urandom_range(0, 5) == 0 && !foreign) ? 3'(1 << $urandom_range(0, 2)) : 3'b000;
    req.rs_valid = ~late;
    issue_valid = 1'b1;
    start = fire_cnt;
    if (late != 3'b000) begin
      @(negedge clk);
      req.rs_valid = 3'b111;
    end
    wait (fire_cnt != start);
    next_id = next_id + 1'b1;
    @(negedge clk);
    issue_valid = 1'b0;
  endtask

  task automatic run_batch(input int n);
    int target;
    target = n_results + n;
    for (int i = 0; i < n; i++) begin
      if ($urandom_range(0, 15) == 0)
        issue_one(32'h00A5_8593, $urandom, $urandom, $urandom, 0, 1'b1); // addi
      issue_one(b_instr[i], b_a[i], b_b[i], b_c[i], i, 1'b0);
      if ($urandom_range(0, 3) == 0) @(negedge clk);
    end
    while (n_results < target) @(posedge clk);
    @(negedge clk);
  endtask

  // ---------------------------------------------------------------------
  // Keccak-f[1600]: reference and CIRCE version
  // ---------------------------------------------------------------------
  logic [63:0] rc[24];
  int rho[25];

  function automatic logic [63:0] rotl64(input logic [63:0] v, input int s);
    if (s % 64 == 0) return v;
    return (v << (s % 64)) | (v >> (64 - s % 64));
  endfunction

  // Round constants from the degree-8 LFSR of the Keccak reference, and
  // rho offsets from the (t+1)(t+2)/2 walk.
  task automatic gen_constants();
    logic [7:0] r;
    int x, y, nx;
    r = 8'h01;
    for (int i = 0; i < 24; i++) begin
      rc[i] = '0;
      for (int j = 0; j < 7; j++) begin
        if (r[0]) rc[i][(1 << j) - 1] = 1'b1;
        r = r[7] ? ((r << 1) ^ 8'h71) : (r << 1);
      end
    end
    rho[0] = 0;
    x = 1; y = 0;
    for (int t = 0; t < 24; t++) begin
      rho[x + 5 * y] = ((t + 1) * (t + 2) / 2) % 64;
      nx = y;
      y = (2 * x + 3 * y) % 5;
      x = nx;
    end
  endtask

  task automatic keccak_ref(inout logic [63:0] a[25]);
    logic [63:0] c[5], d[5], b[25];
    for (int rd = 0; rd < 24; rd++) begin
      for (int x = 0; x < 5; x++) c[x] = a[x] ^ a[x+5] ^ a[x+10] ^ a[x+15] ^ a[x+20];
      for (int x = 0; x < 5; x++) d[x] = c[(x+4)%5] ^ rotl64(c[(x+1)%5], 1);
      for (int i = 0; i < 25; i++) a[i] ^= d[i % 5];
      for (int x = 0; x < 5; x++)
        for (int y = 0; y < 5; y++)
          b[y + 5 * ((2 * x + 3 * y) % 5)] = rotl64(a[x + 5 * y], rho[x + 5 * y]);
      for (int x = 0; x < 5; x++)
        for (int y = 0; y < 5; y++)
          a[x + 5 * y] = b[x + 5 * y] ^ (~b[(x+1)%5 + 5 * y] & b[(x+2)%5 + 5 * y]);
      a[0] ^= rc[rd];
    end
  endtask

  // The state as the 32-bit core keeps it: lo/hi words per lane.
  task automatic keccak_circe(inout logic [31:0] lo[25], inout logic [31:0] hi[25]);
    logic [31:0] clo[5], chi[5], dlo[5], dhi[5], blo[25], bhi[25];
    int n, dst;
    for (int rd = 0; rd < 24; rd++) begin
      // theta
      for (int x = 0; x < 5; x++) begin
        clo[x] = lo[x] ^ lo[x+5] ^ lo[x+10] ^ lo[x+15] ^ lo[x+20];
        chi[x] = hi[x] ^ hi[x+5] ^ hi[x+10] ^ hi[x+15] ^ hi[x+20];
      end
      for (int x = 0; x < 5; x++) begin
        b_instr[2*x]   = enc(F3_ROLLO, 2'b00, 5'd13);
        b_instr[2*x+1] = enc(F3_ROLHI, 2'b00, 5'd14);
        b_a[2*x] = clo[(x+1)%5]; b_b[2*x] = chi[(x+1)%5]; b_c[2*x] = 1;
        b_a[2*x+1] = clo[(x+1)%5]; b_b[2*x+1] = chi[(x+1)%5]; b_c[2*x+1] = 1;
      end
      run_batch(10);
      for (int x = 0; x < 5; x++) begin
        dlo[x] = clo[(x+4)%5] ^ res_mem[2*x];
        dhi[x] = chi[(x+4)%5] ^ res_mem[2*x+1];
      end
      for (int i = 0; i < 25; i++) begin
        lo[i] ^= dlo[i % 5];
        hi[i] ^= dhi[i % 5];
      end
      // rho and pi
      for (int i = 0; i < 25; i++) begin
        b_instr[2*i]   = enc(F3_ROLLO, 2'b00, 5'd15);
        b_instr[2*i+1] = enc(F3_ROLHI, 2'b00, 5'd16);
        b_a[2*i] = lo[i]; b_b[2*i] = hi[i]; b_c[2*i] = rho[i];
        b_a[2*i+1] = lo[i]; b_b[2*i+1] = hi[i]; b_c[2*i+1] = rho[i];
      end
      run_batch(50);
      for (int x = 0; x < 5; x++)
        for (int y = 0; y < 5; y++) begin
          dst = y + 5 * ((2 * x + 3 * y) % 5);
          blo[dst] = res_mem[2 * (x + 5 * y)];
          bhi[dst] = res_mem[2 * (x + 5 * y) + 1];
        end
      // chi
      n = 0;
      for (int x = 0; x < 5; x++)
        for (int y = 0; y < 5; y++) begin
          b_instr[n] = enc(F3_ANDNXOR, 2'b00, 5'd17);
          b_a[n] = blo[x + 5*y]; b_b[n] = blo[(x+1)%5 + 5*y]; b_c[n] = blo[(x+2)%5 + 5*y];
          n++;
          b_instr[n] = enc(F3_ANDNXOR, 2'b00, 5'd18);
          b_a[n] = bhi[x + 5*y]; b_b[n] = bhi[(x+1)%5 + 5*y]; b_c[n] = bhi[(x+2)%5 + 5*y];
          n++;
        end
      run_batch(50);
      n = 0;
      for (int x = 0; x < 5; x++)
        for (int y = 0; y < 5; y++) begin
          lo[x + 5*y] = res_mem[n];
          hi[x + 5*y] = res_mem[n + 1];
          n += 2;
        end
      // iota
      lo[0] ^= rc[rd][31:0];
      hi[0] ^= rc[rd][63:32];
    end
  endtask

  task automatic keccak_test(input logic zero);
    logic [63:0] ref_st[25];
    logic [31:0] lo[25], hi[25];
    for (int i = 0; i < 25; i++) begin
      ref_st[i] = zero ? 64'd0 : {$urandom, $urandom};
      lo[i] = ref_st[i][31:0];
      hi[i] = ref_st[i][63:32];
    end
    keccak_ref(ref_st);
    keccak_circe(lo, hi);
    if (zero) check(ref_st[0] == 64'hF1258F7940E1DDE7, "reference model known answer");
    if (zero) check({hi[0], lo[0]} == 64'hF1258F7940E1DDE7, "CIRCE Keccak-f known answer");
    for (int i = 0; i < 25; i++)
      check({hi[i], lo[i]} === ref_st[i], $sformatf("Keccak lane %0d", i));
  endtask

  // ---------------------------------------------------------------------
  // Modular arithmetic: dot products mod p, exponent sums mod z, reductions
  // ---------------------------------------------------------------------
  task automatic fp_test(input msel_e m, input int unsigned q);
    localparam int N = 24;
    logic [31:0] h[N], e[N];
    longint unsigned acc_ref;
    logic [31:0] acc;
    for (int i = 0; i < N; i++) begin
      h[i] = $urandom_range(0, q - 1);
      e[i] = $urandom_range(0, q - 1);
    end
    // Dot product: each step depends on the previous result.
    acc = 0;
    acc_ref = 0;
    for (int i = 0; i < N; i++) begin
      b_instr[0] = enc(F3_FPMAC, 2'(m), 5'd20);
      b_a[0] = h[i]; b_b[0] = e[i]; b_c[0] = acc;
      run_batch(1);
      acc = res_mem[0];
      acc_ref = (acc_ref + longint'(h[i]) * longint'(e[i])) % longint'(q);
    end
    check(acc == 32'(acc_ref), $sformatf("dot product mod %0d", q));
    // Independent reductions and multiply-adds in one batch.
    for (int i = 0; i < 40; i++) begin
      b_instr[i] = enc(((i % 2) != 0) ? F3_FPRED : F3_FPMAC, 2'(m), 5'd21);
      b_a[i] = ((i % 2) != 0) ? $urandom : $urandom_range(0, 65535);
      b_b[i] = $urandom_range(0, 65535);
      b_c[i] = $urandom;
    end
    run_batch(40);
    for (int i = 0; i < 40; i++) begin
      longint unsigned v;
      v = ((i % 2) != 0) ? longint'(b_a[i]) : longint'(b_a[i]) * longint'(b_b[i]) + longint'(b_c[i]);
      check(res_mem[i] == 32'(v % longint'(q)), $sformatf("fp op %0d mod %0d", i, q));
    end
  endtask

  initial begin
    issue_valid = 1'b0;
    req = '0;
    gen_constants();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(result_valid === 1'b0, "no result after reset");

    keccak_test(1'b1);
    keccak_test(1'b0);
    fp_test(MSEL_P_RSDP, 127);
    fp_test(MSEL_Z_RSDP, 7);
    fp_test(MSEL_P_RSDPG, 509);
    fp_test(MSEL_Z_RSDPG, 127);

    repeat (3) @(posedge clk);
    check(exp_q.size() == 0, "every accepted instruction returned a result");
    $display("mechanisms: reject=%0d operand_wait=%0d stall=%0d back_to_back=%0d backpressure=%0d",
             n_reject, n_opwait, n_stall, n_b2b, n_backpressure);
    $display("ops: rollo=%0d rolhi=%0d andnxor=%0d fpmac=%0d fpred=%0d msel=%0d/%0d/%0d/%0d",
             n_kc[0], n_kc[1], n_kc[2], n_fpop[0], n_fpop[1],
             n_msel[0], n_msel[1], n_msel[2], n_msel[3]);
    $display("cycles=%0d", cycle);
    check(n_reject > 0, "rejection happened");
    check(n_opwait > 0, "operand wait happened");
    check(n_stall > 0, "stall on pending result happened");
    check(n_b2b > 0, "back-to-back issue happened");
    check(n_backpressure > 0, "back-pressure happened");
    for (int i = 0; i < 3; i++) check(n_kc[i] > 0, "each keccak op used");
    for (int i = 0; i < 2; i++) check(n_fpop[i] > 0, "each fp op used");
    for (int i = 0; i < 4; i++) check(n_msel[i] > 0, "each modulus used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
