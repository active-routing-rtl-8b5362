// tb_ar_hmc_ctrl: the host-side controllers on their own, with the network
// replaced by scripted responses.
// Checks: ART-tid sends each Update on link tid mod 4 with the subflow ID
// {target[63:2], link}; ART-addr sends it on the link of the nearest root
// (operands in cube 10 -> link 2, operands in cubes 1 and 4 -> link 0,
// operand in cube 15 -> link 3); Gathers are held until all nthreads
// threads have sent one and then one Gather request goes to each of the
// four roots; the four responses are combined and committed once with the
// right target and value; two flows can be in the merge table at once.
module tb_ar_hmc_ctrl;
  import ar_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic root_mode, cmd_valid, cmd_ready;
  ar_cmd_t cmd;
  logic    [3:0]      tx_valid, rx_valid;
  ar_pkt_t [3:0]      tx_pkt, rx_pkt;
  logic    [3:0][2:0] tx_ready, rx_ready;
  logic commit_valid;
  logic [63:0] commit_target, commit_result;
  ar_op_e commit_opcode;

  ar_hmc_ctrl dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic ck(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  ar_pkt_t sent [4][$];
  always @(posedge clk) if (rst_n)
    for (int l = 0; l < 4; l++) if (tx_valid[l] && tx_ready[l][vc_of(tx_pkt[l].ptype)]) sent[l].push_back(tx_pkt[l]);
  int ncommit = 0;
  logic [63:0] c_t, c_r;
  always @(posedge clk) if (rst_n && commit_valid) begin ncommit++; c_t = commit_target; c_r = commit_result; end

  task automatic issue(ar_cmd_t c);
    @(negedge clk);
    cmd_valid = 1; cmd = c;
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    @(negedge clk);
    cmd_valid = 0;
  endtask
  task automatic respond(int l, logic [63:0] fid, logic [63:0] v);
    @(negedge clk);
    while (!rx_ready[l][VC_GRESP]) @(negedge clk);
    rx_valid[l] = 1; rx_pkt[l] = '0; rx_pkt[l].ptype = PKT_GATHER_RESP;
    rx_pkt[l].flow_id = fid; rx_pkt[l].a = v;
    @(negedge clk);
    rx_valid[l] = 0;
  endtask
  function automatic ar_cmd_t upd(int tid, logic [63:0] s1, logic [63:0] s2, logic two);
    ar_cmd_t c;
    c = '0; c.tid = 8'(tid); c.opcode = two ? OP_MAC_I : OP_SUM_I; c.src1 = s1; c.src2 = s2;
    c.two_opnd = two; c.count = 1; c.target = 64'h2_0000_0100; c.nthreads = 4;
    return c;
  endfunction
  function automatic logic [63:0] ca(int cube);
    return {28'd0, 4'(cube), 32'h100};
  endfunction
  task automatic clear();
    for (int l = 0; l < 4; l++) sent[l].delete();
  endtask

  initial begin
    ar_cmd_t g;
    cmd_valid = 0; cmd = '0; rx_valid = 0; rx_pkt = '0; tx_ready = '1; root_mode = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // ART-tid
    for (int t = 0; t < 8; t++) begin
      clear();
      issue(upd(t, ca(10), ca(10), 1));
      repeat (2) @(negedge clk);
      for (int l = 0; l < 4; l++)
        ck($sformatf("tid %0d on link %0d", t, l), sent[l].size() == ((l == t % 4) ? 1 : 0));
      if (sent[t % 4].size() == 1)
        ck("subflow id", sent[t % 4][0].flow_id == {62'(64'h2_0000_0100 >> 2), 2'(t % 4)} &&
                          sent[t % 4][0].ptype == PKT_UPDATE && sent[t % 4][0].a == ca(10));
    end
    // ART-addr
    root_mode = 1;
    begin
      int exp_l [3] = '{2, 0, 3};
      ar_cmd_t cs [3];
      cs[0] = upd(1, ca(10), ca(11), 1);
      cs[1] = upd(3, ca(1), ca(4), 1);
      cs[2] = upd(2, ca(15), 64'd0, 0);
      for (int i = 0; i < 3; i++) begin
        clear();
        issue(cs[i]);
        repeat (2) @(negedge clk);
        ck($sformatf("ART-addr case %0d link %0d", i, exp_l[i]), sent[exp_l[i]].size() == 1 &&
           sent[0].size() + sent[1].size() + sent[2].size() + sent[3].size() == 1);
      end
    end
    // Gather barrier with two interleaved flows, 4 and 2 threads
    clear();
    for (int t = 0; t < 3; t++) begin
      g = upd(t, 0, 0, 0); g.is_gather = 1; g.opcode = OP_SUM_I; g.nthreads = 4;
      issue(g);
      g.target = 64'h3_0000_0200; g.nthreads = 2;
      if (t < 1) issue(g);
    end
    repeat (3) @(negedge clk);
    ck("no gather before barrier", sent[0].size() + sent[1].size() + sent[2].size() + sent[3].size() == 0);
    g.target = 64'h3_0000_0200; g.nthreads = 2; g.tid = 7;
    issue(g);
    repeat (8) @(negedge clk);
    for (int l = 0; l < 4; l++) begin
      ck("one gather per root for flow B", sent[l].size() == 1);
      if (sent[l].size() == 1)
        ck("gather id", sent[l][0].ptype == PKT_GATHER_REQ && sent[l][0].flow_id == (64'h3_0000_0200 | 64'(l)));
    end
    clear();
    g = upd(3, 0, 0, 0); g.is_gather = 1; g.nthreads = 4;
    issue(g);
    repeat (8) @(negedge clk);
    for (int l = 0; l < 4; l++) ck("one gather per root for flow A", sent[l].size() == 1);
    // responses: A gets 10,20,30,40; B gets 1,2,3,4, interleaved
    for (int l = 0; l < 3; l++) begin
      respond(l, 64'h2_0000_0100 | 64'(l), 64'(10 * (l + 1)));
      respond(l, 64'h3_0000_0200 | 64'(l), 64'(l + 1));
    end
    repeat (3) @(negedge clk);
    ck("no commit before all four roots", ncommit == 0);
    respond(3, 64'h3_0000_0200 | 64'd3, 64'd4);
    repeat (3) @(negedge clk);
    ck("flow B committed", ncommit == 1 && c_t == 64'h3_0000_0200 && c_r == 64'd10);
    respond(3, 64'h2_0000_0100 | 64'd3, 64'd40);
    repeat (3) @(negedge clk);
    ck("flow A committed", ncommit == 2 && c_t == 64'h2_0000_0100 && c_r == 64'd100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
