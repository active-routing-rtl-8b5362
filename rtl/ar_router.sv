// ar_router: the crossbar switch on the logic layer of one memory cube.
//
// Six inputs: the four link ports, the Active-Routing Engine (ARE) and the
// cube's vault. Eight outputs: the four link ports, three ARE inputs
// (Update / Gather requests, Gather responses, operand responses) and the
// vault. Every input keeps one FIFO per virtual channel (requests, operand
// responses, Gather responses): the classes never block one another, which
// keeps a stalled Update from holding up the operand responses it waits for.
// Packets are one flit; each hop costs one cycle through an input FIFO.
//
// Steering:
//  * Update and Gather request arriving on a link -> ARE request input;
//    Gather response arriving on a link -> ARE gather-response input. Every
//    cube on the way processes them; hop_port is overwritten with the port
//    they came in on, which the ARE records as parent or child.
//  * Update / Gather packets from the ARE leave on the link named in hop_port.
//  * Operand request: to the vault when dst_cube is this cube, else minimal
//    route. Operand response: to the ARE when dst_cube is this cube, else
//    minimal route.
// Each output grants one input FIFO per cycle, round robin. A link output
// grants only when the next cube has room in the packet's virtual channel
// (those ready bits come from FIFO fill levels). The local outputs (engine,
// vault) follow valid / ready: valid does not wait for ready, and the packet
// leaves its FIFO when ready is high.
module ar_router
  import ar_pkg::*;
#(
  parameter int unsigned CUBE_ID    = 0,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // links
  input  logic    [NPORTS-1:0]     lk_in_valid,
  input  ar_pkt_t [NPORTS-1:0]     lk_in_pkt,
  output logic    [NPORTS-1:0][NVC-1:0] lk_in_ready,
  output logic    [NPORTS-1:0]     lk_out_valid,
  output ar_pkt_t [NPORTS-1:0]     lk_out_pkt,
  input  logic    [NPORTS-1:0][NVC-1:0] lk_out_ready,
  // engine
  input  logic                     are_tx_valid,
  input  ar_pkt_t                  are_tx_pkt,
  output logic    [NVC-1:0]        are_tx_ready,
  output logic                     are_act_valid,
  output ar_pkt_t                  are_act_pkt,
  input  logic                     are_act_ready,
  output logic                     are_gr_valid,
  output ar_pkt_t                  are_gr_pkt,
  input  logic                     are_gr_ready,
  output logic                     are_or_valid,
  output ar_pkt_t                  are_or_pkt,
  input  logic                     are_or_ready,
  // vault
  output logic                     vault_req_valid,
  output ar_pkt_t                  vault_req_pkt,
  input  logic                     vault_req_ready,
  input  logic                     vault_rsp_valid,
  input  ar_pkt_t                  vault_rsp_pkt,
  output logic                     vault_rsp_ready
);
  localparam int NIN  = NPORTS + 2;    // links, ARE, vault
  localparam int NOUT = NPORTS + 4;    // links, ARE act / gr / or, vault
  localparam int I_ARE = NPORTS, I_VAULT = NPORTS + 1;
  localparam int O_ACT = NPORTS, O_GR = NPORTS + 1, O_OR = NPORTS + 2, O_VAULT = NPORTS + 3;
  localparam int NQ   = NIN * NVC;
  localparam int QW   = $clog2(NQ);
  localparam logic [CUBE_W-1:0] ME = CUBE_W'(CUBE_ID);

  // ------------------------------------------------------------ input FIFOs
  logic    [NIN-1:0]          in_valid;
  ar_pkt_t [NIN-1:0]          in_pkt;
  logic    [NIN-1:0][NVC-1:0] in_ready;
  logic    [NQ-1:0]           q_valid, q_pop;
  ar_pkt_t [NQ-1:0]           q_pkt;

  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      in_valid[p] = lk_in_valid[p];
      in_pkt[p]   = lk_in_pkt[p];
    end
    in_valid[I_ARE]   = are_tx_valid;
    in_pkt[I_ARE]     = are_tx_pkt;
    in_valid[I_VAULT] = vault_rsp_valid;
    in_pkt[I_VAULT]   = vault_rsp_pkt;
  end

  for (genvar i = 0; i < NIN; i++) begin : g_in
    for (genvar v = 0; v < NVC; v++) begin : g_vc
      logic wr;
      assign wr = in_valid[i] && (vc_of(in_pkt[i].ptype) == v);
      ar_fifo #(.T(ar_pkt_t), .DEPTH(FIFO_DEPTH)) u_q (
        .clk, .rst_n,
        .wr_valid(wr), .wr_ready(in_ready[i][v]), .wr_data(in_pkt[i]),
        .rd_valid(q_valid[i*NVC+v]), .rd_ready(q_pop[i*NVC+v]), .rd_data(q_pkt[i*NVC+v]),
        .count()
      );
    end
  end

  assign lk_in_ready     = in_ready[NPORTS-1:0];
  assign are_tx_ready    = in_ready[I_ARE];
  assign vault_rsp_ready = in_ready[I_VAULT][VC_ORESP];

  // ------------------------------------------------------------ steering
  function automatic int unsigned dest_of(int unsigned i, ar_pkt_t p);
    case (p.ptype)
      PKT_UPDATE, PKT_GATHER_REQ:
        return (i == I_ARE) ? int'(p.hop_port) : O_ACT;
      PKT_GATHER_RESP:
        return (i == I_ARE) ? int'(p.hop_port) : O_GR;
      PKT_OPND_REQ:
        return (p.dst_cube == ME) ? O_VAULT : int'(route_port(ME, p.dst_cube));
      default: // PKT_OPND_RESP
        return (p.dst_cube == ME) ? O_OR : int'(route_port(ME, p.dst_cube));
    endcase
  endfunction

  logic [NOUT-1:0][NVC-1:0] out_ready;
  always_comb begin
    for (int p = 0; p < NPORTS; p++) out_ready[p] = lk_out_ready[p];
    out_ready[O_ACT]   = {NVC{are_act_ready}};
    out_ready[O_GR]    = {NVC{are_gr_ready}};
    out_ready[O_OR]    = {NVC{are_or_ready}};
    out_ready[O_VAULT] = {NVC{vault_req_ready}};
  end

  // request matrix: queue q wants output o and o has room in q's channel
  logic [NOUT-1:0][NQ-1:0] req;
  always_comb begin
    req = '0;
    for (int q = 0; q < NQ; q++) begin
      if (q_valid[q]) begin
        for (int o = 0; o < NOUT; o++)
          if (dest_of(q / NVC, q_pkt[q]) == o && (o >= NPORTS || out_ready[o][q % NVC]))
            req[o][q] = 1'b1;
      end
    end
  end

  // ------------------------------------------------------------ arbitration
  logic [NOUT-1:0][QW-1:0] rr_ptr;
  logic [NOUT-1:0]         grant_valid;
  logic [NOUT-1:0][QW-1:0] grant;
  ar_pkt_t [NOUT-1:0]      out_pkt;

  always_comb begin
    grant_valid = '0;
    grant       = '0;
    out_pkt     = '0;
    for (int o = 0; o < NOUT; o++) begin
      for (int k = 0; k < NQ; k++) begin
        int q;
        q = (int'(rr_ptr[o]) + k) % NQ;
        if (!grant_valid[o] && req[o][q]) begin
          grant_valid[o] = 1'b1;
          grant[o]       = QW'(q);
        end
      end
      if (grant_valid[o]) begin
        out_pkt[o]      = q_pkt[grant[o]];
        if (o == O_ACT || o == O_GR) out_pkt[o].hop_port = PORT_W'(grant[o] / NVC);
      end
    end
  end

  // the granted packet leaves when its receiver is ready
  always_comb begin
    q_pop = '0;
    for (int o = 0; o < NOUT; o++)
      if (grant_valid[o] && out_ready[o][int'(grant[o]) % NVC]) q_pop[grant[o]] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_ptr <= '0;
    end else begin
      for (int o = 0; o < NOUT; o++)
        if (grant_valid[o] && q_pop[grant[o]])
          rr_ptr[o] <= (grant[o] == QW'(NQ - 1)) ? '0 : grant[o] + 1'b1;
    end
  end

  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      lk_out_valid[p] = grant_valid[p];
      lk_out_pkt[p]   = out_pkt[p];
    end
  end
  assign are_act_valid   = grant_valid[O_ACT];
  assign are_act_pkt     = out_pkt[O_ACT];
  assign are_gr_valid    = grant_valid[O_GR];
  assign are_gr_pkt      = out_pkt[O_GR];
  assign are_or_valid    = grant_valid[O_OR];
  assign are_or_pkt      = out_pkt[O_OR];
  assign vault_req_valid = grant_valid[O_VAULT];
  assign vault_req_pkt   = out_pkt[O_VAULT];

  // senders respect the room of the virtual channel they write into
  for (genvar i = 0; i < NIN; i++) begin : g_chk
    a_in_room: assert property (@(posedge clk) disable iff (!rst_n)
      in_valid[i] |-> in_ready[i][vc_of(in_pkt[i].ptype)]);
  end

endmodule
