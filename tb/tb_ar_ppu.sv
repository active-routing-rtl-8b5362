// tb_ar_ppu: self-checking testbench of the packet processing unit's
// scheduling, on cube 6 with its own flow table and operand buffers.
// Random Updates (one or two operands, addresses anywhere in the network)
// arrive; the testbench works out independently, from the list of cubes on
// each minimal route, whether cube 6 is the last cube common to the routes
// towards both operands. If it is, the unit must allocate a buffer and send
// operand requests with the right addresses, destinations and buffer IDs;
// otherwise it must forward the Update on the port towards the next cube
// and record that port as a child. The flow must be registered once, with
// the arrival port as parent.
module tb_ar_ppu;
  import ar_pkg::*;
  import ar_tb_pkg::*;

  localparam int ME = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic act_valid, act_ready, gr_valid, gr_ready, tx_valid;
  ar_pkt_t act_pkt, gr_pkt, tx_pkt;
  logic [63:0] lk_key, lk2_key, cmd_flow_id, done_flow_id, done_result, rd_result, wb_result;
  logic lk_hit, lk2_hit, free_avail, done_valid, wb_valid, wb_is_child;
  logic [3:0] lk_idx, lk2_idx, free_idx, rd_idx, ent_idx, cmd_idx, done_idx, wb_idx, agg_idx;
  ar_op_e rd_opcode, ent_opcode, cmd_opcode, ob_alloc_opcode;
  logic [3:0] ent_children;
  logic [1:0] ent_parent, cmd_port, done_parent, wb_port, agg_port;
  logic cmd_register, cmd_set_child, cmd_inc_req, cmd_set_gflag, cmd_release;
  logic ob_alloc_avail, ob_alloc, ob_alloc_op2_ready, agg_valid;
  logic [6:0] ob_alloc_id;
  logic [63:0] ob_alloc_flow_id, ob_alloc_op2, agg_value;
  logic [15:0] valid_o;
  ar_events_t evs;

  ar_ppu #(.CUBE_ID(ME), .FT_ENTRIES(16), .OB_ENTRIES(128)) dut (
    .clk, .rst_n, .act_valid, .act_ready, .act_pkt, .gr_valid, .gr_ready, .gr_pkt,
    .tx_valid, .tx_pkt, .tx_ready(3'b111),
    .ft_lk_key(lk_key), .ft_lk_hit(lk_hit), .ft_lk_idx(lk_idx),
    .ft_free_avail(free_avail), .ft_free_idx(free_idx),
    .ft_ent_idx(), .ft_ent_children(ent_children),
    .ft_cmd_register(cmd_register), .ft_cmd_set_child(cmd_set_child), .ft_cmd_inc_req(cmd_inc_req),
    .ft_cmd_set_gflag(cmd_set_gflag), .ft_cmd_release(cmd_release), .ft_cmd_idx(cmd_idx),
    .ft_cmd_flow_id(cmd_flow_id), .ft_cmd_opcode(cmd_opcode), .ft_cmd_port(cmd_port),
    .ft_done_valid(done_valid), .ft_done_idx(done_idx), .ft_done_flow_id(done_flow_id),
    .ft_done_result(done_result), .ft_done_parent(done_parent),
    .ob_alloc_avail, .ob_alloc_id, .ob_alloc, .ob_alloc_flow_id, .ob_alloc_opcode,
    .ob_alloc_op2_ready, .ob_alloc_op2,
    .agg_valid, .agg_ready(1'b1), .agg_idx, .agg_port, .agg_value,
    .ev_register(evs.flow_register), .ev_update_fwd(evs.update_fwd), .ev_update_sched(evs.update_sched),
    .ev_opnd_req(evs.opnd_req), .ev_ob_stall(evs.ob_stall), .ev_ft_stall(evs.ft_stall),
    .ev_gather_repl(evs.gather_repl), .ev_gather_agg(evs.gather_agg), .ev_gather_resp(evs.gather_resp)
  );
  ar_flow_table #(.ENTRIES(16)) u_ft (
    .clk, .rst_n, .lk_key, .lk_hit, .lk_idx, .lk2_key(64'd0), .lk2_hit, .lk2_idx,
    .free_avail, .free_idx, .rd_idx(4'd0), .rd_opcode, .rd_result,
    .ent_idx(4'd0), .ent_children, .ent_parent, .ent_opcode,
    .cmd_register, .cmd_set_child, .cmd_inc_req, .cmd_set_gflag, .cmd_release,
    .cmd_idx, .cmd_flow_id, .cmd_opcode, .cmd_port,
    .wb_valid(1'b0), .wb_idx(4'd0), .wb_result(64'd0), .wb_is_child(1'b0), .wb_port(2'd0),
    .done_valid, .done_idx, .done_flow_id, .done_result, .done_parent, .valid_o
  );
  ar_operand_buffer #(.ENTRIES(128)) u_ob (
    .clk, .rst_n, .alloc_avail(ob_alloc_avail), .alloc_id(ob_alloc_id), .alloc(ob_alloc),
    .alloc_flow_id(ob_alloc_flow_id), .alloc_opcode(ob_alloc_opcode),
    .alloc_op2_ready(ob_alloc_op2_ready), .alloc_op2(ob_alloc_op2),
    .wr_valid(1'b0), .wr_id(7'd0), .wr_sel(1'b0), .wr_data(64'd0),
    .iss_valid(), .iss_flow_id(), .iss_opcode(), .iss_op1(), .iss_op2(), .free_count()
  );

  int checks = 0, failures = 0;
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic ck(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // cubes visited after src on the minimal route to dst
  function automatic void route_list(int src, int dst, ref int p[$]);
    int gs, gd, gate, land;
    p.delete();
    if (src == dst) return;
    gs = src / 4; gd = dst / 4;
    if (gs == gd) begin p.push_back(dst); return; end
    gate = 4 * gs + gd;
    land = 4 * gd + gs;
    if (src != gate) p.push_back(gate);
    p.push_back(land);
    if (land != dst) p.push_back(dst);
  endfunction

  function automatic int port_to(int src, int nb);
    if (src / 4 == nb / 4) return nb % 4;
    return src % 4;
  endfunction

  // capture what the unit sends
  ar_pkt_t sent [$];
  always @(posedge clk) if (rst_n && tx_valid) sent.push_back(tx_pkt);

  int n_fwd = 0, n_sched = 0;

  initial begin
    act_valid = 0; gr_valid = 0; act_pkt = '0; gr_pkt = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 120; n++) begin
      int ca, cb, two, pa[$], pb[$];
      bit do_sched;
      int nxt;
      ar_pkt_t u;
      ca = $urandom_range(15); cb = $urandom_range(15);
      two = $urandom_range(1);
      if (n < 10) ca = ME;
      u = '0;
      u.ptype = PKT_UPDATE; u.flow_id = 64'h40; u.opcode = two ? OP_MAC_F : OP_SUM_F;
      u.a = {28'd0, 4'(ca), 32'h100 + 32'(n * 8)};
      u.b = {28'd0, 4'(cb), 32'h900 + 32'(n * 8)};
      u.two_opnd = two[0]; u.count = 1; u.hop_port = 2'd1;
      route_list(ME, ca, pa);
      route_list(ME, cb, pb);
      if (!two) do_sched = (ca == ME);
      else do_sched = (ca == ME) || (cb == ME) || (pa[0] != pb[0]);
      nxt = (ca == ME) ? -1 : pa[0];
      sent.delete();
      @(negedge clk);
      act_valid = 1; act_pkt = u;
      do @(posedge clk); while (!act_ready);
      @(negedge clk);
      act_valid = 0;
      repeat (4) @(negedge clk);
      if (do_sched) begin
        n_sched++;
        ck("requests sent", sent.size() == (two ? 2 : 1));
        if (sent.size() >= 1)
          ck("operand 1 request", sent[0].ptype == PKT_OPND_REQ && sent[0].a == u.a &&
             sent[0].dst_cube == 4'(ca) && sent[0].src_cube == 4'(ME) && !sent[0].sel);
        if (two && sent.size() == 2)
          ck("operand 2 request", sent[1].ptype == PKT_OPND_REQ && sent[1].a == u.b &&
             sent[1].dst_cube == 4'(cb) && sent[1].sel && sent[1].buf_id == sent[0].buf_id);
      end else begin
        n_fwd++;
        ck("one forward", sent.size() == 1);
        if (sent.size() == 1)
          ck($sformatf("forward port to %0d", nxt), sent[0].ptype == PKT_UPDATE &&
             sent[0].hop_port == 2'(port_to(ME, nxt)) && sent[0].a == u.a);
        ck("child recorded", ent_children[port_to(ME, nxt)]);
      end
    end
    ck("registered once", valid_o == 16'h0001);
    ck("parent is arrival port", ent_parent == 2'd1);
    ck("both outcomes exercised", n_fwd > 10 && n_sched > 10);
    $display("forwards %0d, scheduled %0d", n_fwd, n_sched);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
