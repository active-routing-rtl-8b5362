// tb_ar_router: the crossbar router of cube 6 (group 1, local port 2, so
// link 2 is its global link to cube 9) on its own.
// Random single-flit packets enter all six inputs while every output's
// ready toggles randomly. Each packet carries a tag in flow_id; the
// testbench computes its expected output with its own copy of the steering
// rules (Update and Gather arriving on a link -> engine request input,
// Gather response from a link -> engine gather-response input, operand
// traffic -> vault or operand-response input when addressed here, else the
// minimal Dragonfly port; engine packets -> the link in hop_port) and
// checks: each packet leaves exactly once, on that output, with hop_port
// set to the arrival link for engine-bound requests and responses, and in
// order per input/channel/output. A second phase blocks the request
// channel of link 1 and checks that an operand response behind stuck
// operand requests on the same input still goes out (virtual channels are independent).
module tb_ar_router;
  import ar_pkg::*;

  localparam int ME = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic    [3:0]      lk_in_valid, lk_out_valid;
  ar_pkt_t [3:0]      lk_in_pkt, lk_out_pkt;
  logic    [3:0][2:0] lk_in_ready, lk_out_ready;
  logic are_tx_valid, are_act_valid, are_act_ready, are_gr_valid, are_gr_ready;
  logic are_or_valid, are_or_ready, vault_req_valid, vault_req_ready, vault_rsp_valid, vault_rsp_ready;
  logic [2:0] are_tx_ready;
  ar_pkt_t are_tx_pkt, are_act_pkt, are_gr_pkt, are_or_pkt, vault_req_pkt, vault_rsp_pkt;

  ar_router #(.CUBE_ID(ME)) dut (.*);

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

  function automatic int port_to(int dst);
    if (dst / 4 == ME / 4) return dst % 4;
    return dst / 4;
  endfunction
  // outputs: 0..3 links, 4 act, 5 gr, 6 or, 7 vault
  function automatic int exp_out(int in, ar_pkt_t p);
    if (p.ptype == PKT_UPDATE || p.ptype == PKT_GATHER_REQ) return (in == 4) ? p.hop_port : 4;
    if (p.ptype == PKT_GATHER_RESP) return (in == 4) ? p.hop_port : 5;
    if (p.ptype == PKT_OPND_REQ) return (p.dst_cube == ME) ? 7 : port_to(p.dst_cube);
    return (p.dst_cube == ME) ? 6 : port_to(p.dst_cube);
  endfunction

  ar_pkt_t inq [6][$];
  int exp_of [logic [63:0]];
  int in_of  [logic [63:0]];
  int last_seq [6][8][3];
  int nsent = 0, nrecv = 0;

  function automatic ar_pkt_t rand_pkt(int in, int seq);
    ar_pkt_t p;
    p = '0;
    p.flow_id = {32'(in), 32'(seq)};
    p.dst_cube = 4'($urandom_range(0, 15));
    p.src_cube = 4'($urandom_range(0, 15));
    p.hop_port = 2'($urandom_range(0, 3));
    if (in == 5) p.ptype = PKT_OPND_RESP;
    else if (in == 4) begin
      case ($urandom_range(0, 2))
        0: p.ptype = PKT_UPDATE;
        1: p.ptype = PKT_GATHER_RESP;
        default: p.ptype = PKT_OPND_REQ;
      endcase
    end else begin
      case ($urandom_range(0, 4))
        0: p.ptype = PKT_UPDATE;
        1: p.ptype = PKT_GATHER_REQ;
        2: p.ptype = PKT_GATHER_RESP;
        3: p.ptype = PKT_OPND_REQ;
        default: p.ptype = PKT_OPND_RESP;
      endcase
    end
    return p;
  endfunction

  logic randomize_ready = 1;
  // drivers: an input is only driven when its channel has room (the
  // upstream side of a link follows the per-channel ready); the pop is
  // decided on the clock edge that samples the packet
  logic [5:0] took;
  always @(posedge clk) begin
    took = '0;
    for (int i = 0; i < 4; i++) took[i] = lk_in_valid[i];
    took[4] = are_tx_valid;
    took[5] = vault_rsp_valid;
  end
  always @(negedge clk) if (rst_n) begin
    for (int i = 0; i < 6; i++) if (took[i]) void'(inq[i].pop_front());
    lk_in_valid = 0; are_tx_valid = 0; vault_rsp_valid = 0;
    for (int i = 0; i < 4; i++)
      if (inq[i].size() > 0 && $urandom_range(0, 3) != 0 && lk_in_ready[i][vc_of(inq[i][0].ptype)]) begin
        lk_in_valid[i] = 1; lk_in_pkt[i] = inq[i][0];
      end
    if (inq[4].size() > 0 && $urandom_range(0, 3) != 0 && are_tx_ready[vc_of(inq[4][0].ptype)]) begin
      are_tx_valid = 1; are_tx_pkt = inq[4][0];
    end
    if (inq[5].size() > 0 && $urandom_range(0, 3) != 0 && vault_rsp_ready) begin
      vault_rsp_valid = 1; vault_rsp_pkt = inq[5][0];
    end
    if (randomize_ready) begin
      for (int o = 0; o < 4; o++) lk_out_ready[o] = 3'($urandom_range(0, 7));
      are_act_ready = $urandom_range(0, 1); are_gr_ready = $urandom_range(0, 1);
      are_or_ready = $urandom_range(0, 1); vault_req_ready = $urandom_range(0, 1);
    end
  end

  task automatic got(int o, ar_pkt_t p);
    int i, s;
    nrecv++;
    if (!exp_of.exists(p.flow_id)) begin ck("unknown or duplicate packet", 0); return; end
    i = in_of[p.flow_id];
    s = int'(p.flow_id[31:0]);
    ck($sformatf("packet %h output %0d expected %0d", p.flow_id, o, exp_of[p.flow_id]), exp_of[p.flow_id] == o);
    if ((o == 4 || o == 5) && i < 4) ck("hop_port = arrival link", p.hop_port == 2'(i));
    ck("order per input/channel/output", s > last_seq[i][o][vc_of(p.ptype)]);
    last_seq[i][o][vc_of(p.ptype)] = s;
    exp_of.delete(p.flow_id);
  endtask
  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < 4; o++) if (lk_out_valid[o]) begin
      ck("link output only into a ready channel", lk_out_ready[o][vc_of(lk_out_pkt[o].ptype)]);
      got(o, lk_out_pkt[o]);
    end
    if (are_act_valid && are_act_ready) got(4, are_act_pkt);
    if (are_gr_valid && are_gr_ready) got(5, are_gr_pkt);
    if (are_or_valid && are_or_ready) got(6, are_or_pkt);
    if (vault_req_valid && vault_req_ready) got(7, vault_req_pkt);
  end

  task automatic push(int i, ar_pkt_t p);
    ar_pkt_t q;
    q = p;
    exp_of[q.flow_id] = exp_out(i, q);
    in_of[q.flow_id] = i;
    inq[i].push_back(q);
    nsent++;
  endtask

  initial begin
    lk_in_valid = 0; lk_in_pkt = '0; are_tx_valid = 0; are_tx_pkt = '0;
    vault_rsp_valid = 0; vault_rsp_pkt = '0; lk_out_ready = '1;
    are_act_ready = 1; are_gr_ready = 1; are_or_ready = 1; vault_req_ready = 1;
    for (int i = 0; i < 6; i++) for (int o = 0; o < 8; o++) for (int v = 0; v < 3; v++) last_seq[i][o][v] = -1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 300; s++) for (int i = 0; i < 6; i++) push(i, rand_pkt(i, s));
    for (int t = 0; t < 20000 && exp_of.size() > 0; t++) @(negedge clk);
    ck($sformatf("all %0d packets delivered (%0d left)", nsent, exp_of.size()), exp_of.size() == 0);
    ck("nothing extra", nrecv == nsent);
    // virtual-channel independence on link 1 (cube 5)
    randomize_ready = 0;
    @(negedge clk);
    lk_out_ready = '1; lk_out_ready[1][VC_REQ] = 0;
    begin
      ar_pkt_t p;
      p = '0; p.ptype = PKT_OPND_REQ; p.dst_cube = 5; p.flow_id = {32'd0, 32'd1000};
      for (int k = 0; k < 3; k++) begin p.flow_id[31:0] = 32'(1000 + k); push(0, p); end
      p = '0; p.ptype = PKT_OPND_RESP; p.dst_cube = 5; p.flow_id = {32'd0, 32'd2000};
      push(0, p);
      repeat (40) @(negedge clk);
      ck("operand response passed the blocked requests", !exp_of.exists({32'd0, 32'd2000}));
      ck("requests still held", exp_of.size() == 3);
      lk_out_ready[1][VC_REQ] = 1;
      repeat (40) @(negedge clk);
      ck("requests released", exp_of.size() == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
