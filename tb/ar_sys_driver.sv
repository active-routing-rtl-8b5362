// ar_sys_driver: stimulus, surroundings and checks for an Active-Routing
// system (active_routing_top). Shared by the end-to-end testbenches.
//
// It plays the parts that are outside the design: NCORES cores that write
// their network-interface registers, an in-order on-chip network that
// merges the interfaces' commands towards the HMC controllers, and sixteen
// vaults (ar_vault_model). It runs these workloads, each on every core at
// once, one Gather per core at the end, and compares every committed result
// with a value computed here from the memory contents:
//   1 mac   (multiply-accumulate of two vectors, doubles, regular-regular,
//           one 64-byte block per Update), ART-addr trees
//   2 reduce (integer sum of single elements, irregular), ART-tid trees
//   3 mac with the second operand sent by the host (regular-irregular)
//   4 three concurrent flows (min of doubles, max of integers, xor)
//   5 sum of absolute differences (irregular-irregular), ART-addr
// It also counts the engine events of all cubes and fails when a mechanism
// never happened (the operand-buffer stall only when REQUIRE_STALL is set).
module ar_sys_driver
  import ar_pkg::*;
  import ar_tb_pkg::*;
#(
  parameter int NCORES        = 4,
  parameter int NBLK          = 4,     // regular blocks per core per workload
  parameter int NSCALAR       = 16,    // irregular elements per core per workload
  parameter int VAULT_LAT     = 20,
  parameter bit REQUIRE_STALL = 1'b1,
  parameter longint TIMEOUT   = 400000
) (
  input  logic                          clk,
  output logic                          rst_n,
  output logic                          root_mode,
  output logic    [NCORES-1:0]          ni_wr_valid,
  input  logic    [NCORES-1:0]          ni_wr_ready,
  output logic    [NCORES-1:0][2:0]     ni_wr_addr,
  output logic    [NCORES-1:0][63:0]    ni_wr_data,
  input  logic    [NCORES-1:0]          ni_cmd_valid,
  input  ar_cmd_t [NCORES-1:0]          ni_cmd,
  output logic    [NCORES-1:0]          ni_cmd_ready,
  output logic                          hc_cmd_valid,
  input  logic                          hc_cmd_ready,
  output ar_cmd_t                       hc_cmd,
  input  logic                          commit_valid,
  input  logic [63:0]                   commit_target,
  input  logic [63:0]                   commit_result,
  input  ar_op_e                        commit_opcode,
  input  logic    [NCUBES-1:0]          vault_req_valid,
  input  ar_pkt_t [NCUBES-1:0]          vault_req_pkt,
  output logic    [NCUBES-1:0]          vault_req_ready,
  output logic    [NCUBES-1:0]          vault_rsp_valid,
  output ar_pkt_t [NCUBES-1:0]          vault_rsp_pkt,
  input  logic    [NCUBES-1:0]          vault_rsp_ready,
  input  ar_events_t [NCUBES-1:0]       ev
);
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    while (cyc < TIMEOUT) @(posedge clk);
    failures++;
    $display("FAIL watchdog at cycle %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ vaults
  for (genvar c = 0; c < NCUBES; c++) begin : g_vault
    ar_vault_model #(.LAT(VAULT_LAT)) u_vault (
      .clk, .rst_n,
      .req_valid(vault_req_valid[c]), .req_pkt(vault_req_pkt[c]), .req_ready(vault_req_ready[c]),
      .rsp_valid(vault_rsp_valid[c]), .rsp_pkt(vault_rsp_pkt[c]), .rsp_ready(vault_rsp_ready[c])
    );
  end

  // ------------------------------------------------------------ on-chip network
  // round robin over the interfaces, one command per cycle, order kept per core
  int noc_ptr = 0;
  int noc_sel;
  always_comb begin
    noc_sel = -1;
    for (int k = 0; k < NCORES; k++) begin
      int c;
      c = (noc_ptr + k) % NCORES;
      if (noc_sel < 0 && ni_cmd_valid[c]) noc_sel = c;
    end
    hc_cmd_valid = (noc_sel >= 0);
    hc_cmd       = (noc_sel >= 0) ? ni_cmd[noc_sel] : '0;
    ni_cmd_ready = '0;
    if (noc_sel >= 0) ni_cmd_ready[noc_sel] = hc_cmd_ready;
  end
  always @(posedge clk) if (hc_cmd_valid && hc_cmd_ready) noc_ptr <= (noc_sel + 1) % NCORES;

  // ------------------------------------------------------------ events
  int n_register = 0, n_fwd = 0, n_sched = 0, n_oreq = 0, n_obstall = 0, n_alu = 0;
  int n_bypass = 0, n_repl = 0, n_agg = 0, n_gresp = 0;
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < NCUBES; c++) begin
      n_register += int'(ev[c].flow_register);
      n_fwd      += int'(ev[c].update_fwd);
      n_sched    += int'(ev[c].update_sched);
      n_oreq     += int'(ev[c].opnd_req);
      n_obstall  += int'(ev[c].ob_stall);
      n_alu      += int'(ev[c].alu_op);
      n_bypass   += int'(ev[c].bypass);
      n_repl     += int'(ev[c].gather_repl);
      n_agg      += int'(ev[c].gather_agg);
      n_gresp    += int'(ev[c].gather_resp);
    end
  end

  // ------------------------------------------------------------ commits
  logic [63:0] got [logic [63:0]];
  int          ncommit = 0;
  always @(posedge clk) if (rst_n && commit_valid) begin
    got[commit_target] = commit_result;
    ncommit++;
  end

  // ------------------------------------------------------------ cores
  task automatic ni_write(int c, logic [2:0] a, logic [63:0] d);
    @(negedge clk);
    ni_wr_valid[c] = 1'b1;
    ni_wr_addr[c]  = a;
    ni_wr_data[c]  = d;
    do @(posedge clk); while (!ni_wr_ready[c]);
    @(negedge clk);
    ni_wr_valid[c] = 1'b0;
  endtask

  // pattern 0 regular-regular, 1 regular-irregular, 2 irregular-irregular
  task automatic update(int c, ar_op_e op, int pattern, int count,
                        logic [63:0] s1, logic [63:0] s2, logic [63:0] tgt);
    ni_write(c, 3'd0, s1);
    ni_write(c, 3'd1, s2);
    ni_write(c, 3'd2, tgt);
    ni_write(c, 3'd3, {44'd0, 4'(count), 6'd0, 2'(pattern), 2'd0, 6'(op)});
    ni_write(c, 3'd5, 64'd0);
  endtask

  task automatic gather(int c, ar_op_e op, logic [63:0] tgt, int nthreads);
    ni_write(c, 3'd2, tgt);
    ni_write(c, 3'd3, {58'd0, 6'(op)});
    ni_write(c, 3'd4, 64'(nthreads));
    ni_write(c, 3'd5, 64'd1);
  endtask

  function automatic logic [63:0] mk_addr(int cube, longint off);
    return {28'd0, 4'(cube), 32'(off)};
  endfunction

  // regular vectors: block k of A lives in cube k % 16, of B in (5k + 3) % 16
  function automatic logic [63:0] a_blk(int k);
    return mk_addr(k % 16, 64'h1000_0000 + longint'(k / 16) * 64);
  endfunction
  function automatic logic [63:0] b_blk(int k);
    return mk_addr((5 * k + 3) % 16, 64'h2000_0000 + longint'(k / 16) * 64);
  endfunction
  // irregular element j of core c
  function automatic logic [63:0] rnd_addr(int c, int j, int salt);
    int h;
    h = (c * 7919 + j * 104729 + salt * 1299709) & 32'h7fff_ffff;
    return mk_addr(h % 16, 64'h3000_0000 + longint'((h / 16) % 65536) * 8);
  endfunction

  logic [63:0] expect_val [logic [63:0]];

  localparam logic [63:0] T_MAC  = 64'h0000_0000_0000_1000;
  localparam logic [63:0] T_RED  = 64'h0000_0000_0000_2000;
  localparam logic [63:0] T_RI   = 64'h0000_0000_0000_3000;
  localparam logic [63:0] T_MIN  = 64'h0000_0000_0000_4000;
  localparam logic [63:0] T_MAX  = 64'h0000_0000_0000_4100;
  localparam logic [63:0] T_XOR  = 64'h0000_0000_0000_4200;
  localparam logic [63:0] T_ABS  = 64'h0000_0000_0000_5000;

  task automatic run_phase(int phase);
    int target_commits;
    int ndone;
    ndone = 0;
    target_commits = ncommit + ((phase == 4) ? 3 : 1);
    for (int c = 0; c < NCORES; c++) begin
      fork
        automatic int cc = c;
        begin
          case (phase)
            1: begin
              for (int j = 0; j < NBLK; j++)
                update(cc, OP_MAC_F, 0, 8, a_blk(cc * NBLK + j), b_blk(cc * NBLK + j), T_MAC);
              gather(cc, OP_MAC_F, T_MAC, NCORES);
            end
            2: begin
              for (int j = 0; j < NSCALAR; j++)
                update(cc, OP_SUM_I, 2, 1, rnd_addr(cc, j, 1), 64'd0, T_RED);
              gather(cc, OP_SUM_I, T_RED, NCORES);
            end
            3: begin
              for (int j = 0; j < NSCALAR; j++)
                update(cc, OP_MAC_F, 1, 1, a_blk(cc * NSCALAR + j) + 64'(8 * (j % 8)),
                       mem_value(rnd_addr(cc, j, 3)), T_RI);
              gather(cc, OP_MAC_F, T_RI, NCORES);
            end
            4: begin
              ar_op_e op;
              logic [63:0] t;
              int nt;
              op = (cc % 3 == 0) ? OP_MIN_F : (cc % 3 == 1) ? OP_MAX_I : OP_XOR;
              t  = (cc % 3 == 0) ? T_MIN : (cc % 3 == 1) ? T_MAX : T_XOR;
              nt = 0;
              for (int k = 0; k < NCORES; k++) if (k % 3 == cc % 3) nt++;
              for (int j = 0; j < NSCALAR; j++)
                update(cc, op, 2, 1, rnd_addr(cc, j, 4), 64'd0, t);
              gather(cc, op, t, nt);
            end
            default: begin
              for (int j = 0; j < NSCALAR; j++)
                update(cc, OP_ABSDIFF_F, 2, 1, rnd_addr(cc, j, 5), rnd_addr(cc, j, 6), T_ABS);
              gather(cc, OP_ABSDIFF_F, T_ABS, NCORES);
            end
          endcase
          ndone++;
        end
      join_none
    end
    while (ndone < NCORES) @(posedge clk);
    if (phase == 4 && NCORES < 3) target_commits = ncommit + NCORES;
    while (ncommit < target_commits) @(posedge clk);
  endtask

  task automatic compute_expected();
    real s;
    logic [63:0] acc;
    // 1: mac over blocks
    s = 0.0;
    for (int k = 0; k < NCORES * NBLK; k++)
      for (int e = 0; e < 8; e++)
        s += r(mem_value(a_blk(k) + 64'(8 * e))) * r(mem_value(b_blk(k) + 64'(8 * e)));
    expect_val[T_MAC] = $realtobits(s);
    // 2: integer sum
    acc = 0;
    for (int c = 0; c < NCORES; c++)
      for (int j = 0; j < NSCALAR; j++) acc += mem_value(rnd_addr(c, j, 1));
    expect_val[T_RED] = acc;
    // 3: mac with host-sent operand
    s = 0.0;
    for (int c = 0; c < NCORES; c++)
      for (int j = 0; j < NSCALAR; j++)
        s += r(mem_value(a_blk(c * NSCALAR + j) + 64'(8 * (j % 8)))) * r(mem_value(rnd_addr(c, j, 3)));
    expect_val[T_RI] = $realtobits(s);
    // 4: three flows
    begin
      real mn;
      logic [63:0] mx, x;
      mn = 1.0e300; mx = 64'h8000_0000_0000_0000; x = 0;
      for (int c = 0; c < NCORES; c++)
        for (int j = 0; j < NSCALAR; j++) begin
          logic [63:0] v;
          v = mem_value(rnd_addr(c, j, 4));
          if (c % 3 == 0 && r(v) < mn) mn = r(v);
          if (c % 3 == 1 && $signed(v) > $signed(mx)) mx = v;
          if (c % 3 == 2) x ^= v;
        end
      expect_val[T_MIN] = $realtobits(mn);
      expect_val[T_MAX] = mx;
      expect_val[T_XOR] = x;
    end
    // 5: absolute differences
    s = 0.0;
    for (int c = 0; c < NCORES; c++)
      for (int j = 0; j < NSCALAR; j++) begin
        real d;
        d = r(mem_value(rnd_addr(c, j, 5))) - r(mem_value(rnd_addr(c, j, 6)));
        s += (d < 0.0) ? -d : d;
      end
    expect_val[T_ABS] = $realtobits(s);
  endtask

  task automatic check_target(string name, logic [63:0] t);
    checks++;
    if (!got.exists(t)) begin
      failures++;
      $display("FAIL %s: no commit", name);
    end else if (got[t] !== expect_val[t]) begin
      failures++;
      $display("FAIL %s: got %h expected %h", name, got[t], expect_val[t]);
    end else begin
      $display("ok   %s = %h (cycle %0d)", name, got[t], cyc);
    end
  endtask

  task automatic mech(string name, int n);
    checks++;
    $display("     %-28s %0d", name, n);
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", name); end
  endtask

  initial begin
    rst_n = 1'b0;
    root_mode = 1'b1;
    ni_wr_valid = '0; ni_wr_addr = '0; ni_wr_data = '0;
    compute_expected();
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    root_mode = 1'b1; run_phase(1); check_target("mac (ART-addr)", T_MAC);
    root_mode = 1'b0; run_phase(2); check_target("reduce (ART-tid)", T_RED);
    root_mode = 1'b1; run_phase(3); check_target("mac regular-irregular", T_RI);
    root_mode = 1'b0; run_phase(4);
    check_target("min of doubles", T_MIN);
    if (NCORES > 1) check_target("max of integers", T_MAX);
    if (NCORES > 2) check_target("xor", T_XOR);
    root_mode = 1'b1; run_phase(5); check_target("sum of |a-b|", T_ABS);

    repeat (50) @(negedge clk);
    checks++;
    if (ncommit != 4 + ((NCORES >= 3) ? 3 : NCORES)) begin
      failures++; $display("FAIL unexpected commit count %0d", ncommit);
    end
    mech("flow registrations", n_register);
    mech("Update forwards", n_fwd);
    mech("Update elements computed", n_sched);
    mech("operand requests", n_oreq);
    mech("ALU operations", n_alu);
    mech("ALU bypasses", n_bypass);
    mech("Gather replications", n_repl);
    mech("child results folded", n_agg);
    mech("Gather responses", n_gresp);
    if (REQUIRE_STALL) mech("operand-buffer stalls", n_obstall);
    else $display("     %-28s %0d", "operand-buffer stalls", n_obstall);
    $display("finished at cycle %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
