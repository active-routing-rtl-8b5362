// ar_engine: Active-Routing Engine (ARE), the in-network compute unit that
// sits next to the crossbar switch on the logic layer of every memory cube.
//
// It is built, as in the document, from a packet processing unit (ar_ppu),
// a flow table (ar_flow_table, 16 entries), a shared pool of operand buffers
// (ar_operand_buffer, 128 entries) and a pipelined ALU (ar_alu, 9 cycles).
//
// Inputs from the switch, each valid / ready:
//   act_*   Update and Gather-request packets (hop_port = arrival port)
//   gr_*    Gather-response packets from children (hop_port = arrival port)
//   or_*    operand responses; always accepted (their buffer entry was
//           reserved before the request left), one per cycle
// Output to the switch: tx_* with one ready bit per virtual channel. Active
// packets carry the link port to leave on in hop_port; operand requests are
// routed by dst_cube.
// Timing: an operand response written at cycle t can enter the ALU at t+2
// (ready queue, one cycle of buffer access) and reaches the flow table
// LAT + 1 cycles later.
module ar_engine
  import ar_pkg::*;
#(
  parameter int unsigned CUBE_ID    = 0,
  parameter int unsigned FT_ENTRIES = 16,
  parameter int unsigned OB_ENTRIES = 128,
  parameter int unsigned ALU_LAT    = 9
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           act_valid,
  output logic           act_ready,
  input  ar_pkt_t        act_pkt,
  input  logic           gr_valid,
  output logic           gr_ready,
  input  ar_pkt_t        gr_pkt,
  input  logic           or_valid,
  output logic           or_ready,
  input  ar_pkt_t        or_pkt,
  output logic           tx_valid,
  output ar_pkt_t        tx_pkt,
  input  logic [NVC-1:0] tx_ready,
  output ar_events_t     ev,
  output logic [FT_ENTRIES-1:0] flows_live
);
  localparam int FW = $clog2(FT_ENTRIES);
  localparam int OW = $clog2(OB_ENTRIES);

  // flow table wiring
  logic [63:0]       lk_key, lk2_key, cmd_flow_id, done_flow_id, done_result, rd_result;
  logic              lk_hit, lk2_hit, free_avail, done_valid;
  logic [FW-1:0]     lk_idx, lk2_idx, free_idx, rd_idx, ent_idx, cmd_idx, done_idx;
  ar_op_e            rd_opcode, ent_opcode, cmd_opcode;
  logic [NPORTS-1:0] ent_children;
  logic [PORT_W-1:0] ent_parent, cmd_port, done_parent;
  logic              cmd_register, cmd_set_child, cmd_inc_req, cmd_set_gflag, cmd_release;
  logic              wb_valid, wb_is_child;
  logic [FW-1:0]     wb_idx;
  logic [63:0]       wb_result;
  logic [PORT_W-1:0] wb_port;

  // operand buffer wiring
  logic              ob_alloc_avail, ob_alloc, ob_alloc_op2_ready;
  logic [OW-1:0]     ob_alloc_id;
  logic [63:0]       ob_alloc_flow_id, ob_alloc_op2;
  ar_op_e            ob_alloc_opcode;
  logic              iss_valid;
  logic [63:0]       iss_flow_id, iss_op1, iss_op2;
  ar_op_e            iss_opcode;

  // ALU wiring
  logic              agg_valid, agg_ready;
  logic [FW-1:0]     agg_idx;
  logic [PORT_W-1:0] agg_port;
  logic [63:0]       agg_value;
  logic              bypass;

  assign or_ready = 1'b1;

  ar_ppu #(.CUBE_ID(CUBE_ID), .FT_ENTRIES(FT_ENTRIES), .OB_ENTRIES(OB_ENTRIES)) u_ppu (
    .clk, .rst_n,
    .act_valid, .act_ready, .act_pkt,
    .gr_valid, .gr_ready, .gr_pkt,
    .tx_valid, .tx_pkt, .tx_ready,
    .ft_lk_key(lk_key), .ft_lk_hit(lk_hit), .ft_lk_idx(lk_idx),
    .ft_free_avail(free_avail), .ft_free_idx(free_idx),
    .ft_ent_idx(ent_idx), .ft_ent_children(ent_children),
    .ft_cmd_register(cmd_register), .ft_cmd_set_child(cmd_set_child),
    .ft_cmd_inc_req(cmd_inc_req), .ft_cmd_set_gflag(cmd_set_gflag),
    .ft_cmd_release(cmd_release), .ft_cmd_idx(cmd_idx), .ft_cmd_flow_id(cmd_flow_id),
    .ft_cmd_opcode(cmd_opcode), .ft_cmd_port(cmd_port),
    .ft_done_valid(done_valid), .ft_done_idx(done_idx), .ft_done_flow_id(done_flow_id),
    .ft_done_result(done_result), .ft_done_parent(done_parent),
    .ob_alloc_avail, .ob_alloc_id, .ob_alloc, .ob_alloc_flow_id, .ob_alloc_opcode,
    .ob_alloc_op2_ready, .ob_alloc_op2,
    .agg_valid, .agg_ready, .agg_idx, .agg_port, .agg_value,
    .ev_register(ev.flow_register), .ev_update_fwd(ev.update_fwd),
    .ev_update_sched(ev.update_sched), .ev_opnd_req(ev.opnd_req),
    .ev_ob_stall(ev.ob_stall), .ev_ft_stall(ev.ft_stall),
    .ev_gather_repl(ev.gather_repl), .ev_gather_agg(ev.gather_agg),
    .ev_gather_resp(ev.gather_resp)
  );

  ar_flow_table #(.ENTRIES(FT_ENTRIES)) u_ft (
    .clk, .rst_n,
    .lk_key, .lk_hit, .lk_idx,
    .lk2_key, .lk2_hit, .lk2_idx,
    .free_avail, .free_idx,
    .rd_idx, .rd_opcode, .rd_result,
    .ent_idx, .ent_children, .ent_parent, .ent_opcode,
    .cmd_register, .cmd_set_child, .cmd_inc_req, .cmd_set_gflag, .cmd_release,
    .cmd_idx, .cmd_flow_id, .cmd_opcode, .cmd_port,
    .wb_valid, .wb_idx, .wb_result, .wb_is_child, .wb_port,
    .done_valid, .done_idx, .done_flow_id, .done_result, .done_parent,
    .valid_o(flows_live)
  );

  ar_operand_buffer #(.ENTRIES(OB_ENTRIES)) u_ob (
    .clk, .rst_n,
    .alloc_avail(ob_alloc_avail), .alloc_id(ob_alloc_id), .alloc(ob_alloc),
    .alloc_flow_id(ob_alloc_flow_id), .alloc_opcode(ob_alloc_opcode),
    .alloc_op2_ready(ob_alloc_op2_ready), .alloc_op2(ob_alloc_op2),
    .wr_valid(or_valid), .wr_id(or_pkt.buf_id[OW-1:0]), .wr_sel(or_pkt.sel),
    .wr_data(or_pkt.a),
    .iss_valid, .iss_flow_id, .iss_opcode, .iss_op1, .iss_op2,
    .free_count()
  );

  ar_alu #(.LAT(ALU_LAT), .FT_ENTRIES(FT_ENTRIES)) u_alu (
    .clk, .rst_n,
    .in_valid(iss_valid), .in_flow_id(iss_flow_id), .in_opcode(iss_opcode),
    .in_op1(iss_op1), .in_op2(iss_op2),
    .agg_valid, .agg_ready, .agg_idx, .agg_port, .agg_value,
    .ft_key(lk2_key), .ft_hit(lk2_hit), .ft_idx(lk2_idx),
    .ft_rd_idx(rd_idx), .ft_rd_opcode(rd_opcode), .ft_rd_result(rd_result),
    .wb_valid, .wb_idx, .wb_result, .wb_is_child, .wb_port,
    .bypass_o(bypass)
  );

  assign ev.alu_op = iss_valid;
  assign ev.bypass = bypass;

endmodule
