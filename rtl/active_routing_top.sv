// active_routing_top: an Active-Routing system. Cores offload reductions
// (sum += f(A[i], B[i]) over large data) into a memory network of 16 cubes,
// where each cube's Active-Routing Engine computes near the data and the
// partial results are reduced on the way back along dynamically built trees.
//
// Contents: NCORES network interfaces (ar_network_interface, one per core),
// the extended HMC controllers (ar_hmc_ctrl) and the memory network
// (ar_memory_network: 16 x router + engine, Dragonfly).
// The parts of the system that are not built here are brought out as ports:
//  * the cores write their network interface registers on ni_wr_*;
//  * the on-chip network carries the interfaces' commands (ni_cmd_*) to the
//    controllers (hc_cmd_*), in order per core;
//  * every cube's vault answers operand requests (vault_req_* /
//    vault_rsp_*).
// A finished flow appears on commit_* for one cycle; ev[] gives per-cube
// event pulses for observation.
module active_routing_top
  import ar_pkg::*;
#(
  parameter int unsigned NCORES        = 16,
  parameter int unsigned FT_ENTRIES    = 16,
  parameter int unsigned OB_ENTRIES    = 128,
  parameter int unsigned ALU_LAT       = 9,
  parameter int unsigned FIFO_DEPTH    = 4,
  parameter int unsigned MERGE_ENTRIES = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          root_mode,        // 0 ART-tid, 1 ART-addr
  // core side
  input  logic    [NCORES-1:0]          ni_wr_valid,
  output logic    [NCORES-1:0]          ni_wr_ready,
  input  logic    [NCORES-1:0][2:0]     ni_wr_addr,
  input  logic    [NCORES-1:0][63:0]    ni_wr_data,
  // on-chip network, interface end
  output logic    [NCORES-1:0]          ni_cmd_valid,
  output ar_cmd_t [NCORES-1:0]          ni_cmd,
  input  logic    [NCORES-1:0]          ni_cmd_ready,
  // on-chip network, controller end
  input  logic                          hc_cmd_valid,
  output logic                          hc_cmd_ready,
  input  ar_cmd_t                       hc_cmd,
  // finished flows
  output logic                          commit_valid,
  output logic [63:0]                   commit_target,
  output logic [63:0]                   commit_result,
  output ar_op_e                        commit_opcode,
  // vaults
  output logic    [NCUBES-1:0]          vault_req_valid,
  output ar_pkt_t [NCUBES-1:0]          vault_req_pkt,
  input  logic    [NCUBES-1:0]          vault_req_ready,
  input  logic    [NCUBES-1:0]          vault_rsp_valid,
  input  ar_pkt_t [NCUBES-1:0]          vault_rsp_pkt,
  output logic    [NCUBES-1:0]          vault_rsp_ready,
  output ar_events_t [NCUBES-1:0]       ev
);
  for (genvar c = 0; c < NCORES; c++) begin : g_ni
    ar_network_interface #(.CORE_ID(c)) u_ni (
      .clk, .rst_n,
      .wr_valid(ni_wr_valid[c]), .wr_ready(ni_wr_ready[c]),
      .wr_addr(ni_wr_addr[c]), .wr_data(ni_wr_data[c]),
      .cmd_valid(ni_cmd_valid[c]), .cmd(ni_cmd[c]), .cmd_ready(ni_cmd_ready[c])
    );
  end

  logic    [NHOST-1:0]          h2n_valid, n2h_valid;
  ar_pkt_t [NHOST-1:0]          h2n_pkt, n2h_pkt;
  logic    [NHOST-1:0][NVC-1:0] h2n_ready, n2h_ready;

  ar_hmc_ctrl #(.MERGE_ENTRIES(MERGE_ENTRIES)) u_hmc (
    .clk, .rst_n, .root_mode,
    .cmd_valid(hc_cmd_valid), .cmd_ready(hc_cmd_ready), .cmd(hc_cmd),
    .tx_valid(h2n_valid), .tx_pkt(h2n_pkt), .tx_ready(h2n_ready),
    .rx_valid(n2h_valid), .rx_pkt(n2h_pkt), .rx_ready(n2h_ready),
    .commit_valid, .commit_target, .commit_result, .commit_opcode
  );

  ar_memory_network #(.FT_ENTRIES(FT_ENTRIES), .OB_ENTRIES(OB_ENTRIES),
                      .ALU_LAT(ALU_LAT), .FIFO_DEPTH(FIFO_DEPTH)) u_net (
    .clk, .rst_n,
    .host_in_valid(h2n_valid), .host_in_pkt(h2n_pkt), .host_in_ready(h2n_ready),
    .host_out_valid(n2h_valid), .host_out_pkt(n2h_pkt), .host_out_ready(n2h_ready),
    .vault_req_valid, .vault_req_pkt, .vault_req_ready,
    .vault_rsp_valid, .vault_rsp_pkt, .vault_rsp_ready,
    .ev
  );

endmodule
