// ar_cube: the logic layer of one memory cube in the Active-Routing memory
// network: the crossbar switch (ar_router) with the Active-Routing Engine
// (ar_engine) attached to it, and a vault port.
//
// The vault port stands for the cube's vault controllers and DRAM, which are
// not part of this design: operand requests addressed to this cube leave on
// vault_req_*, and the vault answers with operand responses (same buf_id and
// sel, data in field a, dst_cube = the requesting cube) on vault_rsp_*.
// Link ports connect to neighbouring cubes or, on a cube attached to the
// host, to an HMC controller. Each link direction is a valid / packet pair
// with one ready bit per virtual channel going back.
module ar_cube
  import ar_pkg::*;
#(
  parameter int unsigned CUBE_ID    = 0,
  parameter int unsigned FT_ENTRIES = 16,
  parameter int unsigned OB_ENTRIES = 128,
  parameter int unsigned ALU_LAT    = 9,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic    [NPORTS-1:0]          lk_in_valid,
  input  ar_pkt_t [NPORTS-1:0]          lk_in_pkt,
  output logic    [NPORTS-1:0][NVC-1:0] lk_in_ready,
  output logic    [NPORTS-1:0]          lk_out_valid,
  output ar_pkt_t [NPORTS-1:0]          lk_out_pkt,
  input  logic    [NPORTS-1:0][NVC-1:0] lk_out_ready,
  output logic                          vault_req_valid,
  output ar_pkt_t                       vault_req_pkt,
  input  logic                          vault_req_ready,
  input  logic                          vault_rsp_valid,
  input  ar_pkt_t                       vault_rsp_pkt,
  output logic                          vault_rsp_ready,
  output ar_events_t                    ev
);
  logic           are_tx_valid, are_act_valid, are_act_ready, are_gr_valid, are_gr_ready;
  logic           are_or_valid, are_or_ready;
  ar_pkt_t        are_tx_pkt, are_act_pkt, are_gr_pkt, are_or_pkt;
  logic [NVC-1:0] are_tx_ready;

  ar_router #(.CUBE_ID(CUBE_ID), .FIFO_DEPTH(FIFO_DEPTH)) u_router (
    .clk, .rst_n,
    .lk_in_valid, .lk_in_pkt, .lk_in_ready,
    .lk_out_valid, .lk_out_pkt, .lk_out_ready,
    .are_tx_valid, .are_tx_pkt, .are_tx_ready,
    .are_act_valid, .are_act_pkt, .are_act_ready,
    .are_gr_valid, .are_gr_pkt, .are_gr_ready,
    .are_or_valid, .are_or_pkt, .are_or_ready,
    .vault_req_valid, .vault_req_pkt, .vault_req_ready,
    .vault_rsp_valid, .vault_rsp_pkt, .vault_rsp_ready
  );

  ar_engine #(.CUBE_ID(CUBE_ID), .FT_ENTRIES(FT_ENTRIES), .OB_ENTRIES(OB_ENTRIES),
              .ALU_LAT(ALU_LAT)) u_are (
    .clk, .rst_n,
    .act_valid(are_act_valid), .act_ready(are_act_ready), .act_pkt(are_act_pkt),
    .gr_valid(are_gr_valid), .gr_ready(are_gr_ready), .gr_pkt(are_gr_pkt),
    .or_valid(are_or_valid), .or_ready(are_or_ready), .or_pkt(are_or_pkt),
    .tx_valid(are_tx_valid), .tx_pkt(are_tx_pkt), .tx_ready(are_tx_ready),
    .ev, .flows_live()
  );

endmodule
