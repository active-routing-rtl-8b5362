// ar_hmc_ctrl: the host's four HMC controllers, extended for Active-Routing.
//
// Commands from the cores' network interfaces arrive in order on cmd_*.
//  * Update: the controllers pick the host link, and so the root cube of the
//    Active-Routing tree, by one of the two schemes of the document:
//    root_mode 0 (ART-tid) interleaves by thread ID, link = tid mod 4;
//    root_mode 1 (ART-addr) takes the link whose root cube is nearest to the
//    operands (fewest hops to the first plus, for two-operand operations,
//    to the second operand; the lower link on a tie). Each root builds its
//    own tree, so a flow is split into up to four subflows; the subflow ID
//    is the target address with the link number in bits [1:0].
//  * Gather: counted per flow in a merge table. When the Gathers of all
//    nthreads threads are in (the implicit barrier of the Gather call), one
//    Gather request goes to each of the four roots.
//  * Gather responses from the four roots are folded into the merge entry;
//    the fourth completes the flow, which is committed on commit_* (one
//    cycle) and its merge entry freed.
// A root that no Update reached answers its Gather with the identity value.
// Links: tx_* into the network, per-virtual-channel ready; rx_* from it,
// through a two-entry FIFO per link so that ready depends on fill level only.
// Commands are accepted at most one per cycle; a Gather that completes the
// barrier holds the command input while its four requests go out.
// Targets must be at least 4-byte aligned.
module ar_hmc_ctrl
  import ar_pkg::*;
#(
  parameter int unsigned MERGE_ENTRIES = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          root_mode,
  input  logic                          cmd_valid,
  output logic                          cmd_ready,
  input  ar_cmd_t                       cmd,
  output logic    [NHOST-1:0]           tx_valid,
  output ar_pkt_t [NHOST-1:0]           tx_pkt,
  input  logic    [NHOST-1:0][NVC-1:0]  tx_ready,
  input  logic    [NHOST-1:0]           rx_valid,
  input  ar_pkt_t [NHOST-1:0]           rx_pkt,
  output logic    [NHOST-1:0][NVC-1:0]  rx_ready,
  output logic                          commit_valid,
  output logic [63:0]                   commit_target,
  output logic [63:0]                   commit_result,
  output ar_op_e                        commit_opcode
);
  localparam int MW = $clog2(MERGE_ENTRIES);

  typedef struct packed {
    logic [63:0] target;
    ar_op_e      opcode;
    logic [7:0]  nthreads;
    logic [7:0]  arrived;
    logic [2:0]  nresp;
    logic [63:0] result;
  } merge_t;

  merge_t                   mt [MERGE_ENTRIES];
  logic [MERGE_ENTRIES-1:0] mvalid;

  // ------------------------------------------------------------ root choice
  logic [1:0] root_sel;
  always_comb begin
    int unsigned best, d;
    best = 0;
    d = 0;
    root_sel = cmd.tid[1:0];
    if (root_mode) begin
      best = 99;
      root_sel = 2'd0;
      for (int r = 0; r < NHOST; r++) begin
        d = hops(root_cube(2'(r)), addr_cube(cmd.src1));
        if (cmd.two_opnd && !cmd.imm2) d = d + hops(root_cube(2'(r)), addr_cube(cmd.src2));
        if (d < best) begin best = d; root_sel = 2'(r); end
      end
    end
  end

  // ------------------------------------------------------------ merge lookup
  logic          c_hit, c_free;
  logic [MW-1:0] c_idx, c_free_idx;
  logic [63:0]   c_key;
  assign c_key = {cmd.target[63:2], 2'b00};
  always_comb begin
    c_hit = 1'b0; c_idx = '0; c_free = 1'b0; c_free_idx = '0;
    for (int i = MERGE_ENTRIES - 1; i >= 0; i--) begin
      if (mvalid[i] && mt[i].target == c_key) begin c_hit = 1'b1; c_idx = MW'(i); end
      if (!mvalid[i]) begin c_free = 1'b1; c_free_idx = MW'(i); end
    end
  end

  // ------------------------------------------------------------ Gather broadcast
  logic          bcast;
  logic [1:0]    bcast_link;
  logic [MW-1:0] bcast_idx;

  logic [MW-1:0] g_idx;
  logic          g_last;
  assign g_idx  = c_hit ? c_idx : c_free_idx;
  assign g_last = c_hit ? (mt[c_idx].arrived + 8'd1 >= mt[c_idx].nthreads)
                        : (cmd.nthreads <= 8'd1);

  always_comb begin
    tx_valid  = '0;
    tx_pkt    = '0;
    cmd_ready = 1'b0;
    if (bcast) begin
      tx_pkt[bcast_link].ptype   = PKT_GATHER_REQ;
      tx_pkt[bcast_link].flow_id = {mt[bcast_idx].target[63:2], bcast_link};
      tx_pkt[bcast_link].opcode  = mt[bcast_idx].opcode;
      tx_valid[bcast_link]       = tx_ready[bcast_link][VC_REQ];
    end else if (cmd_valid) begin
      if (!cmd.is_gather) begin
        tx_pkt[root_sel].ptype    = PKT_UPDATE;
        tx_pkt[root_sel].flow_id  = {cmd.target[63:2], root_sel};
        tx_pkt[root_sel].opcode   = cmd.opcode;
        tx_pkt[root_sel].a        = cmd.src1;
        tx_pkt[root_sel].b        = cmd.src2;
        tx_pkt[root_sel].two_opnd = cmd.two_opnd;
        tx_pkt[root_sel].imm2     = cmd.imm2;
        tx_pkt[root_sel].count    = cmd.count;
        tx_valid[root_sel]        = tx_ready[root_sel][VC_REQ];
        cmd_ready                 = tx_ready[root_sel][VC_REQ];
      end else begin
        cmd_ready = c_hit || c_free;
      end
    end
  end

  // ------------------------------------------------------------ responses
  logic    [NHOST-1:0] rq_valid, rq_pop;
  ar_pkt_t [NHOST-1:0] rq_pkt;
  for (genvar r = 0; r < NHOST; r++) begin : g_rx
    logic wr_rdy;
    ar_fifo #(.T(ar_pkt_t), .DEPTH(2)) u_rxq (
      .clk, .rst_n,
      .wr_valid(rx_valid[r]), .wr_ready(wr_rdy), .wr_data(rx_pkt[r]),
      .rd_valid(rq_valid[r]), .rd_ready(rq_pop[r]), .rd_data(rq_pkt[r]),
      .count()
    );
    assign rx_ready[r] = {NVC{wr_rdy}};
  end

  logic [1:0]    r_sel;
  logic          r_any, r_hit;
  logic [MW-1:0] r_idx;
  logic [63:0]   r_key;
  always_comb begin
    r_any = 1'b0; r_sel = '0;
    for (int r = NHOST - 1; r >= 0; r--) if (rq_valid[r]) begin r_any = 1'b1; r_sel = 2'(r); end
    r_key = {rq_pkt[r_sel].flow_id[63:2], 2'b00};
    r_hit = 1'b0; r_idx = '0;
    for (int i = MERGE_ENTRIES - 1; i >= 0; i--)
      if (mvalid[i] && mt[i].target == r_key) begin r_hit = 1'b1; r_idx = MW'(i); end
    rq_pop = '0;
    if (r_any) rq_pop[r_sel] = 1'b1;
  end

  logic [63:0] r_new;
  assign r_new = ar_combine(mt[r_idx].opcode, mt[r_idx].result, rq_pkt[r_sel].a);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mvalid        <= '0;
      for (int i = 0; i < MERGE_ENTRIES; i++) mt[i] <= '0;
      bcast         <= 1'b0;
      bcast_link    <= '0;
      bcast_idx     <= '0;
      commit_valid  <= 1'b0;
      commit_target <= '0;
      commit_result <= '0;
      commit_opcode <= OP_SUM_I;
    end else begin
      commit_valid <= 1'b0;
      // Gather from a thread
      if (!bcast && cmd_valid && cmd_ready && cmd.is_gather) begin
        if (!c_hit) begin
          mvalid[g_idx]      <= 1'b1;
          mt[g_idx].target   <= c_key;
          mt[g_idx].opcode   <= cmd.opcode;
          mt[g_idx].nthreads <= cmd.nthreads;
          mt[g_idx].arrived  <= 8'd1;
          mt[g_idx].nresp    <= '0;
          mt[g_idx].result   <= ar_identity(cmd.opcode);
        end else begin
          mt[g_idx].arrived  <= mt[g_idx].arrived + 8'd1;
        end
        if (g_last) begin
          bcast      <= 1'b1;
          bcast_link <= '0;
          bcast_idx  <= g_idx;
        end
      end
      if (bcast && tx_valid[bcast_link]) begin
        if (bcast_link == 2'(NHOST - 1)) bcast <= 1'b0;
        bcast_link <= bcast_link + 2'd1;
      end
      // Gather response from a root
      if (r_any && r_hit) begin
        if (mt[r_idx].nresp == 3'(NHOST - 1)) begin
          mvalid[r_idx] <= 1'b0;
          commit_valid  <= 1'b1;
          commit_target <= mt[r_idx].target;
          commit_result <= r_new;
          commit_opcode <= mt[r_idx].opcode;
        end else begin
          mt[r_idx].result <= r_new;
          mt[r_idx].nresp  <= mt[r_idx].nresp + 3'd1;
        end
      end
    end
  end

  a_resp_known: assert property (@(posedge clk) disable iff (!rst_n)
    r_any |-> (r_hit && rq_pkt[r_sel].ptype == PKT_GATHER_RESP));

endmodule
