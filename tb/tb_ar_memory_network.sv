// tb_ar_memory_network: the 16-cube network with its engines and model
// vaults, driven directly on the host links.
// It builds the example tree of the document's overview: from root cube 0,
// one-operand Updates whose operands live in cubes 4, 9 and 11, and
// two-operand Updates with operands in cubes 13 and 15, which must be
// computed in cube 12, the last cube the two routes share. Then Gathers go
// to all four roots. Checks: the flow is registered exactly in cubes
// 0, 1, 2, 3, 4, 8, 9, 11 and 12; the operations run in cubes 4, 9, 11 and
// 12 only; root 0 returns the exact total and the other roots, which no
// Update reached, return the identity; every engine that registered the
// flow sends exactly one Gather response.
module tb_ar_memory_network;
  import ar_pkg::*;
  import ar_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic    [3:0]          h_in_valid, h_out_valid;
  ar_pkt_t [3:0]          h_in_pkt, h_out_pkt;
  logic    [3:0][2:0]     h_in_ready;
  logic    [15:0]         vq_valid, vq_ready, vr_valid, vr_ready;
  ar_pkt_t [15:0]         vq_pkt, vr_pkt;
  ar_events_t [15:0]      ev;

  ar_memory_network #(.OB_ENTRIES(16)) dut (
    .clk, .rst_n,
    .host_in_valid(h_in_valid), .host_in_pkt(h_in_pkt), .host_in_ready(h_in_ready),
    .host_out_valid(h_out_valid), .host_out_pkt(h_out_pkt), .host_out_ready({4{3'b111}}),
    .vault_req_valid(vq_valid), .vault_req_pkt(vq_pkt), .vault_req_ready(vq_ready),
    .vault_rsp_valid(vr_valid), .vault_rsp_pkt(vr_pkt), .vault_rsp_ready(vr_ready),
    .ev
  );
  for (genvar c = 0; c < 16; c++) begin : g_v
    ar_vault_model #(.LAT(15)) u_v (.clk, .rst_n,
      .req_valid(vq_valid[c]), .req_pkt(vq_pkt[c]), .req_ready(vq_ready[c]),
      .rsp_valid(vr_valid[c]), .rsp_pkt(vr_pkt[c]), .rsp_ready(vr_ready[c]));
  end

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

  int reg_cnt [16], alu_cnt [16], gr_cnt [16];
  always @(posedge clk) if (rst_n)
    for (int c = 0; c < 16; c++) begin
      reg_cnt[c] += int'(ev[c].flow_register);
      alu_cnt[c] += int'(ev[c].alu_op);
      gr_cnt[c]  += int'(ev[c].gather_resp);
    end

  ar_pkt_t resp [4][$];
  always @(posedge clk) if (rst_n)
    for (int r = 0; r < 4; r++) if (h_out_valid[r]) resp[r].push_back(h_out_pkt[r]);

  task automatic send(int r, ar_pkt_t p);
    @(negedge clk);
    while (!h_in_ready[r][vc_of(p.ptype)]) @(negedge clk);
    h_in_valid[r] = 1; h_in_pkt[r] = p;
    @(negedge clk);
    h_in_valid[r] = 0;
  endtask

  function automatic logic [63:0] ad(int cube, int k);
    return {28'd0, 4'(cube), 32'h0004_0000 + 32'(k * 8)};
  endfunction

  initial begin
    ar_pkt_t u;
    real exp_sum;
    int one_cubes [3] = '{4, 9, 11};
    for (int c = 0; c < 16; c++) begin reg_cnt[c] = 0; alu_cnt[c] = 0; gr_cnt[c] = 0; end
    h_in_valid = 0; h_in_pkt = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    exp_sum = 0.0;
    // Updates from root 0; flow 0x700, opcode: double MAC / SUM mix is not
    // allowed in one flow, so the one-operand ones use ABSDIFF with a
    // host-sent zero as second operand (|a - 0| = |a|)
    for (int k = 0; k < 6; k++) begin
      foreach (one_cubes[i]) begin
        u = '0; u.ptype = PKT_UPDATE; u.flow_id = 64'h700; u.opcode = OP_ABSDIFF_F;
        u.a = ad(one_cubes[i], k); u.b = $realtobits(0.0); u.two_opnd = 1; u.imm2 = 1; u.count = 1;
        exp_sum += (r(mem_value(u.a)) < 0.0) ? -r(mem_value(u.a)) : r(mem_value(u.a));
        send(0, u);
      end
      u = '0; u.ptype = PKT_UPDATE; u.flow_id = 64'h700; u.opcode = OP_ABSDIFF_F;
      u.a = ad(13, k); u.b = ad(15, k + 40); u.two_opnd = 1; u.count = 4;
      for (int e = 0; e < 4; e++) begin
        real d;
        d = r(mem_value(u.a + 64'(8 * e))) - r(mem_value(u.b + 64'(8 * e)));
        exp_sum += (d < 0.0) ? -d : d;
      end
      send(0, u);
    end
    for (int rr = 0; rr < 4; rr++) begin
      u = '0; u.ptype = PKT_GATHER_REQ; u.flow_id = 64'h700 | 64'(rr); u.opcode = OP_ABSDIFF_F;
      send(rr, u);
    end
    repeat (600) @(negedge clk);
    for (int c = 0; c < 16; c++) begin
      int e_reg;
      e_reg = (c inside {0, 1, 2, 3, 4, 8, 9, 11, 12}) ? 1 : 0;
      if (c inside {5, 10, 15}) e_reg = 1;   // roots reached only by a Gather
      ck($sformatf("cube %0d registrations %0d", c, reg_cnt[c]), reg_cnt[c] == e_reg);
      ck($sformatf("cube %0d ALU use %0d", c, alu_cnt[c]),
         (c inside {4, 9, 11}) ? alu_cnt[c] == 6 : (c == 12) ? alu_cnt[c] == 24 : alu_cnt[c] == 0);
    end
    for (int rr = 0; rr < 4; rr++) begin
      ck($sformatf("root %0d answered once", rr), resp[rr].size() == 1);
      if (resp[rr].size() == 1) begin
        ck("gather response type", resp[rr][0].ptype == PKT_GATHER_RESP &&
                                   resp[rr][0].flow_id == (64'h700 | 64'(rr)));
        ck($sformatf("root %0d result %h", rr, resp[rr][0].a),
           resp[rr][0].a == ((rr == 0) ? $realtobits(exp_sum) : 64'd0));
      end
    end
    for (int c = 0; c < 16; c++)
      ck($sformatf("cube %0d sent one Gather response per registration", c), gr_cnt[c] == reg_cnt[c]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
