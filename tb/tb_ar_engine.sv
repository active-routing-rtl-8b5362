// tb_ar_engine: one Active-Routing Engine (cube 0, a root) with a small
// operand buffer (4 entries), with the router and vault played by the
// testbench.
// Phase 1: Updates whose operands are local (cube 0) are scheduled; the
// engine asks for every element (checked: address, destination cube,
// source cube), the testbench answers after a random delay, and with only
// four buffers the engine must stall. Updates whose operand lives in cube
// 8 are forwarded unchanged on port 2 (the tree edge 0 -> 2 -> 8).
// Phase 2: a Gather from the host (port 0) is replicated once to the child
// on port 2; the child's response is folded in; the engine then answers
// the host on port 0 with the exact total and frees the flow entry.
module tb_ar_engine;
  import ar_pkg::*;
  import ar_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic act_valid, act_ready, gr_valid, gr_ready, or_valid, or_ready, tx_valid;
  ar_pkt_t act_pkt, gr_pkt, or_pkt, tx_pkt;
  logic [2:0] tx_ready;
  ar_events_t ev;
  logic [15:0] flows_live;

  ar_engine #(.CUBE_ID(0), .OB_ENTRIES(4)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic ck(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  localparam logic [63:0] FID = 64'h5_0000_0080;
  int n_stall = 0, n_req = 0;
  always @(posedge clk) if (rst_n) n_stall += int'(ev.ob_stall);

  // the vault and the router's link side
  ar_pkt_t fwd [$], grq [$], grs [$];
  ar_pkt_t pend [$];
  int      due  [$];
  int      now = 0;
  logic    req_bad = 0;
  logic    or_valid_q;
  always @(posedge clk) if (rst_n) begin
    now++;
    if (tx_valid && tx_ready[vc_of(tx_pkt.ptype)]) begin
      case (tx_pkt.ptype)
        PKT_OPND_REQ: begin
          ar_pkt_t r;
          n_req++;
          if (tx_pkt.dst_cube != addr_cube(tx_pkt.a) || tx_pkt.src_cube != 0 || tx_pkt.dst_cube != 0) req_bad = 1;
          r = tx_pkt; r.ptype = PKT_OPND_RESP; r.a = mem_value(tx_pkt.a);
          r.dst_cube = tx_pkt.src_cube; r.src_cube = tx_pkt.dst_cube;
          pend.push_back(r); due.push_back(now + $urandom_range(5, 30));
        end
        PKT_UPDATE:      fwd.push_back(tx_pkt);
        PKT_GATHER_REQ:  grq.push_back(tx_pkt);
        PKT_GATHER_RESP: grs.push_back(tx_pkt);
        default: req_bad = 1;
      endcase
    end
  end
  always @(negedge clk) begin
    or_valid = 0;
    if (or_valid_q) begin void'(pend.pop_front()); void'(due.pop_front()); end
    if (pend.size() > 0 && due[0] <= now) begin or_valid = 1; or_pkt = pend[0]; end
  end
  always @(posedge clk) or_valid_q <= rst_n && or_valid && or_ready;

  task automatic send_act(ar_pkt_t p);
    @(negedge clk);
    act_valid = 1; act_pkt = p;
    @(posedge clk);
    while (!act_ready) @(posedge clk);
    @(negedge clk);
    act_valid = 0;
  endtask

  initial begin
    ar_pkt_t u;
    real local_sum;
    or_pkt = '0; act_valid = 0; act_pkt = '0; gr_valid = 0; gr_pkt = '0; tx_ready = '1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    local_sum = 0.0;
    for (int k = 0; k < 16; k++) begin
      u = '0; u.ptype = PKT_UPDATE; u.flow_id = FID; u.opcode = OP_SUM_F; u.hop_port = 0;
      if (k % 4 == 3) begin
        u.a = {28'd0, 4'd8, 32'(k * 64)}; u.count = 8;
        send_act(u);
      end else begin
        u.a = {28'd0, 4'd0, 32'(k * 64)}; u.count = 4'(1 + k % 8);
        for (int e = 0; e < int'(u.count); e++) local_sum += r(mem_value(u.a + 64'(8 * e)));
        send_act(u);
      end
    end
    repeat (300) @(negedge clk);
    ck("operand requests well formed", !req_bad);
    ck($sformatf("one request per local element (%0d)", n_req), n_req == 1+2+3+5+6+7+1+2+3+5+6+7);
    ck($sformatf("operand buffer stalls seen (%0d)", n_stall), n_stall > 0);
    ck("four Updates forwarded", fwd.size() == 4);
    foreach (fwd[i]) ck("forward on port 2, unchanged", fwd[i].hop_port == 2 && fwd[i].flow_id == FID &&
                        fwd[i].count == 8 && addr_cube(fwd[i].a) == 8 && fwd[i].opcode == OP_SUM_F);
    ck("one flow live", $countones(flows_live) == 1);
    u = '0; u.ptype = PKT_GATHER_REQ; u.flow_id = FID; u.opcode = OP_SUM_F; u.hop_port = 0;
    send_act(u);
    repeat (20) @(negedge clk);
    ck("one Gather to the child", grq.size() == 1 && grq[0].hop_port == 2 && grq[0].flow_id == FID);
    ck("no answer before the child", grs.size() == 0);
    @(negedge clk);
    gr_valid = 1; gr_pkt = '0; gr_pkt.ptype = PKT_GATHER_RESP; gr_pkt.flow_id = FID;
    gr_pkt.a = $realtobits(1000.5); gr_pkt.hop_port = 2;
    @(posedge clk);
    while (!gr_ready) @(posedge clk);
    @(negedge clk);
    gr_valid = 0;
    repeat (40) @(negedge clk);
    ck("one answer to the parent", grs.size() == 1);
    if (grs.size() == 1)
      ck($sformatf("answer %f on port 0", r(grs[0].a)), grs[0].hop_port == 0 && grs[0].flow_id == FID &&
         grs[0].a == $realtobits(local_sum + 1000.5));
    ck("flow entry freed", flows_live == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
