// ar_ppu: packet processing unit of an Active-Routing Engine.
//
// Follows the document's four packet flow charts:
//  * Update: register the flow if the table has no entry for it (its parent
//    is the port the packet came in on). If this cube is not the scheduled
//    compute cube, forward the Update one hop and set the child flag of that
//    port. Otherwise, for each element of the Update, take an operand buffer
//    (waiting while none is free), count the operation in req_counter and
//    send one or two operand requests carrying the buffer ID.
//    The compute cube is the last cube common to the minimal routes towards
//    both operands: the Update moves on while both operands lie ahead along
//    the same next hop, and stops at the cube where the routes split or where
//    an operand lives. One-operand and immediate-operand Updates stop at the
//    operand's cube. An Update of n elements (regular accesses, one 64-byte
//    block) covers addresses a + 8k and b + 8k, k < n.
//  * Operand response: handled by the operand buffer itself, not here.
//  * Gather request: register the flow if needed (a root reached by no
//    Update answers with the identity value), set Gflag and replicate the
//    Gather to every child.
//  * Gather response: the child's partial result is folded in by the ALU,
//    which also clears that child's flag.
//  * Whenever the flow table reports a finished subtree (Gflag set, no child
//    pending, req_counter == resp_counter) the unit sends a Gather response
//    with the partial result to the parent port and releases the entry.
// One action per cycle, priority: finished subtree, Gather response,
// Update / Gather request. Gather requests and responses arrive on separate
// inputs so that a stalled Update never blocks the responses it waits for.
// Packets leave on one output (tx), one per cycle, when the virtual channel
// of their type has room.
module ar_ppu
  import ar_pkg::*;
#(
  parameter int unsigned CUBE_ID    = 0,
  parameter int unsigned FT_ENTRIES = 16,
  parameter int unsigned OB_ENTRIES = 128
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // Update / Gather requests (hop_port = arrival port)
  input  logic                          act_valid,
  output logic                          act_ready,
  input  ar_pkt_t                       act_pkt,
  // Gather responses (hop_port = arrival port)
  input  logic                          gr_valid,
  output logic                          gr_ready,
  input  ar_pkt_t                       gr_pkt,
  // packets out
  output logic                          tx_valid,
  output ar_pkt_t                       tx_pkt,
  input  logic [NVC-1:0]                tx_ready,
  // flow table
  output logic [63:0]                   ft_lk_key,
  input  logic                          ft_lk_hit,
  input  logic [$clog2(FT_ENTRIES)-1:0] ft_lk_idx,
  input  logic                          ft_free_avail,
  input  logic [$clog2(FT_ENTRIES)-1:0] ft_free_idx,
  output logic [$clog2(FT_ENTRIES)-1:0] ft_ent_idx,
  input  logic [NPORTS-1:0]             ft_ent_children,
  output logic                          ft_cmd_register,
  output logic                          ft_cmd_set_child,
  output logic                          ft_cmd_inc_req,
  output logic                          ft_cmd_set_gflag,
  output logic                          ft_cmd_release,
  output logic [$clog2(FT_ENTRIES)-1:0] ft_cmd_idx,
  output logic [63:0]                   ft_cmd_flow_id,
  output ar_op_e                        ft_cmd_opcode,
  output logic [PORT_W-1:0]             ft_cmd_port,
  input  logic                          ft_done_valid,
  input  logic [$clog2(FT_ENTRIES)-1:0] ft_done_idx,
  input  logic [63:0]                   ft_done_flow_id,
  input  logic [63:0]                   ft_done_result,
  input  logic [PORT_W-1:0]             ft_done_parent,
  // operand buffer allocation
  input  logic                          ob_alloc_avail,
  input  logic [$clog2(OB_ENTRIES)-1:0] ob_alloc_id,
  output logic                          ob_alloc,
  output logic [63:0]                   ob_alloc_flow_id,
  output ar_op_e                        ob_alloc_opcode,
  output logic                          ob_alloc_op2_ready,
  output logic [63:0]                   ob_alloc_op2,
  // gathered partial results to the ALU
  output logic                          agg_valid,
  input  logic                          agg_ready,
  output logic [$clog2(FT_ENTRIES)-1:0] agg_idx,
  output logic [PORT_W-1:0]             agg_port,
  output logic [63:0]                   agg_value,
  // event pulses
  output logic                          ev_register,
  output logic                          ev_update_fwd,
  output logic                          ev_update_sched,
  output logic                          ev_opnd_req,
  output logic                          ev_ob_stall,
  output logic                          ev_ft_stall,
  output logic                          ev_gather_repl,
  output logic                          ev_gather_agg,
  output logic                          ev_gather_resp
);
  localparam int FW = $clog2(FT_ENTRIES);
  localparam logic [CUBE_W-1:0] ME = CUBE_W'(CUBE_ID);

  typedef enum logic [2:0] {S_IDLE, S_UPD, S_REQ2, S_GREQ, S_GREPL} state_e;

  state_e            state;
  ar_pkt_t           cur;
  logic [FW-1:0]     cur_idx;
  logic [3:0]        elem;
  logic [OB_ID_W-1:0] cur_buf;
  logic [NPORTS-1:0] repl_mask;

  // scheduling decision for the Update being processed
  logic [CUBE_W-1:0] ca, cb;
  logic              two_addr, sched;
  logic [PORT_W-1:0] next_port, repl_port;
  logic [3:0]        nelem;
  logic              last_elem;
  logic [63:0]       elem_a, elem_b;

  assign ca        = addr_cube(cur.a);
  assign cb        = addr_cube(cur.b);
  assign two_addr  = cur.two_opnd && !cur.imm2;
  assign next_port = route_port(ME, ca);
  assign sched     = (ME == ca) ||
                     (two_addr && ((ME == cb) || (route_port(ME, ca) != route_port(ME, cb))));
  assign nelem     = (cur.count == 0) ? 4'd1 : cur.count;
  assign last_elem = (elem + 4'd1 >= nelem);
  assign elem_a    = cur.a + {57'd0, elem, 3'b000};
  assign elem_b    = cur.b + {57'd0, elem, 3'b000};

  always_comb begin
    repl_port = '0;
    for (int i = NPORTS - 1; i >= 0; i--) if (repl_mask[i]) repl_port = PORT_W'(i);
  end

  always_comb begin
    act_ready = 1'b0;
    gr_ready  = 1'b0;
    tx_valid  = 1'b0;
    tx_pkt    = '0;
    ft_lk_key = gr_valid ? gr_pkt.flow_id : act_pkt.flow_id;
    ft_ent_idx = cur_idx;
    ft_cmd_register = 1'b0; ft_cmd_set_child = 1'b0; ft_cmd_inc_req = 1'b0;
    ft_cmd_set_gflag = 1'b0; ft_cmd_release = 1'b0;
    ft_cmd_idx = cur_idx; ft_cmd_flow_id = act_pkt.flow_id;
    ft_cmd_opcode = act_pkt.opcode; ft_cmd_port = act_pkt.hop_port;
    ob_alloc = 1'b0; ob_alloc_flow_id = cur.flow_id; ob_alloc_opcode = cur.opcode;
    ob_alloc_op2_ready = !cur.two_opnd || cur.imm2; ob_alloc_op2 = cur.b;
    agg_valid = 1'b0; agg_idx = ft_lk_idx; agg_port = gr_pkt.hop_port; agg_value = gr_pkt.a;
    ev_register = 1'b0; ev_update_fwd = 1'b0; ev_update_sched = 1'b0; ev_opnd_req = 1'b0;
    ev_ob_stall = 1'b0; ev_ft_stall = 1'b0; ev_gather_repl = 1'b0; ev_gather_agg = 1'b0;
    ev_gather_resp = 1'b0;

    case (state)
      S_IDLE: begin
        if (ft_done_valid) begin
          // subtree finished: report to the parent and free the entry
          tx_pkt.ptype    = PKT_GATHER_RESP;
          tx_pkt.flow_id  = ft_done_flow_id;
          tx_pkt.a        = ft_done_result;
          tx_pkt.hop_port = ft_done_parent;
          if (tx_ready[VC_GRESP]) begin
            tx_valid       = 1'b1;
            ft_cmd_release = 1'b1;
            ft_cmd_idx     = ft_done_idx;
            ev_gather_resp = 1'b1;
          end
        end else if (gr_valid) begin
          agg_valid = ft_lk_hit;
          if (!ft_lk_hit || agg_ready) gr_ready = 1'b1;
          ev_gather_agg = ft_lk_hit && agg_ready;
        end else if (act_valid) begin
          if (ft_lk_hit) begin
            act_ready = 1'b1;
          end else if (ft_free_avail) begin
            act_ready       = 1'b1;
            ft_cmd_register = 1'b1;
            ft_cmd_idx      = ft_free_idx;
            ev_register     = 1'b1;
          end else begin
            ev_ft_stall = 1'b1;
          end
        end
      end

      S_UPD: begin
        if (!sched) begin
          tx_pkt          = cur;
          tx_pkt.hop_port = next_port;
          if (tx_ready[VC_REQ]) begin
            tx_valid         = 1'b1;
            ft_cmd_set_child = 1'b1;
            ft_cmd_port      = next_port;
            ev_update_fwd    = 1'b1;
          end
        end else begin
          tx_pkt.ptype    = PKT_OPND_REQ;
          tx_pkt.flow_id  = cur.flow_id;
          tx_pkt.a        = elem_a;
          tx_pkt.dst_cube = addr_cube(elem_a);
          tx_pkt.src_cube = ME;
          tx_pkt.buf_id   = OB_ID_W'(ob_alloc_id);
          tx_pkt.sel      = 1'b0;
          if (!ob_alloc_avail) begin
            ev_ob_stall = 1'b1;
          end else if (tx_ready[VC_REQ]) begin
            tx_valid        = 1'b1;
            ob_alloc        = 1'b1;
            ft_cmd_inc_req  = 1'b1;
            ev_update_sched = 1'b1;
            ev_opnd_req     = 1'b1;
          end
        end
      end

      S_REQ2: begin
        tx_pkt.ptype    = PKT_OPND_REQ;
        tx_pkt.flow_id  = cur.flow_id;
        tx_pkt.a        = elem_b;
        tx_pkt.dst_cube = addr_cube(elem_b);
        tx_pkt.src_cube = ME;
        tx_pkt.buf_id   = cur_buf;
        tx_pkt.sel      = 1'b1;
        if (tx_ready[VC_REQ]) begin
          tx_valid    = 1'b1;
          ev_opnd_req = 1'b1;
        end
      end

      S_GREQ: begin
        ft_cmd_set_gflag = 1'b1;
      end

      S_GREPL: begin
        tx_pkt          = cur;
        tx_pkt.hop_port = repl_port;
        if (repl_mask != '0 && tx_ready[VC_REQ]) begin
          tx_valid       = 1'b1;
          ev_gather_repl = 1'b1;
        end
      end

      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cur       <= '0;
      cur_idx   <= '0;
      elem      <= '0;
      cur_buf   <= '0;
      repl_mask <= '0;
    end else begin
      case (state)
        S_IDLE: begin
          if (act_valid && act_ready) begin
            cur     <= act_pkt;
            cur_idx <= ft_lk_hit ? ft_lk_idx : ft_free_idx;
            elem    <= '0;
            state   <= (act_pkt.ptype == PKT_GATHER_REQ) ? S_GREQ : S_UPD;
          end
        end
        S_UPD: begin
          if (tx_valid) begin
            if (!sched) begin
              state <= S_IDLE;
            end else if (two_addr) begin
              cur_buf <= OB_ID_W'(ob_alloc_id);
              state   <= S_REQ2;
            end else if (last_elem) begin
              state <= S_IDLE;
            end else begin
              elem <= elem + 4'd1;
            end
          end
        end
        S_REQ2: begin
          if (tx_valid) begin
            if (last_elem) begin
              state <= S_IDLE;
            end else begin
              elem  <= elem + 4'd1;
              state <= S_UPD;
            end
          end
        end
        S_GREQ: begin
          repl_mask <= ft_ent_children;
          state     <= S_GREPL;
        end
        S_GREPL: begin
          if (repl_mask == '0) state <= S_IDLE;
          else if (tx_valid)   repl_mask[repl_port] <= 1'b0;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // only Updates and Gather requests arrive on the request input
  a_act_type: assert property (@(posedge clk) disable iff (!rst_n)
    act_valid |-> act_pkt.ptype inside {PKT_UPDATE, PKT_GATHER_REQ});
  // a Gather response always finds its flow
  a_gr_known: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_IDLE && !ft_done_valid && gr_valid) |-> ft_lk_hit);

endmodule
