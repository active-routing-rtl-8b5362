// ar_memory_network: sixteen memory cubes (ar_cube) joined into the
// Dragonfly memory network.
//
// Cube c = 4*g + l belongs to group g at local index l. The four cubes of a
// group are fully connected (port k of cube (g,l) reaches cube (g,k), k != l,
// arriving on its port l). Port l of cube (g,l) is its external port: a
// global link to cube (l,g) when l != g, so that every pair of groups shares
// exactly one link, and a host link when l == g. Cubes 0, 5, 10 and 15 are
// therefore the four cubes attached to the host's four HMC controllers, and
// the roots of Active-Routing trees. Links are modelled as one packet per
// cycle per direction with per-virtual-channel ready.
// Host link r: host_in_* is what the controller sends into cube 5r,
// host_out_* what cube 5r sends to the controller.
module ar_memory_network
  import ar_pkg::*;
#(
  parameter int unsigned FT_ENTRIES = 16,
  parameter int unsigned OB_ENTRIES = 128,
  parameter int unsigned ALU_LAT    = 9,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic    [NHOST-1:0]           host_in_valid,
  input  ar_pkt_t [NHOST-1:0]           host_in_pkt,
  output logic    [NHOST-1:0][NVC-1:0]  host_in_ready,
  output logic    [NHOST-1:0]           host_out_valid,
  output ar_pkt_t [NHOST-1:0]           host_out_pkt,
  input  logic    [NHOST-1:0][NVC-1:0]  host_out_ready,
  output logic    [NCUBES-1:0]          vault_req_valid,
  output ar_pkt_t [NCUBES-1:0]          vault_req_pkt,
  input  logic    [NCUBES-1:0]          vault_req_ready,
  input  logic    [NCUBES-1:0]          vault_rsp_valid,
  input  ar_pkt_t [NCUBES-1:0]          vault_rsp_pkt,
  output logic    [NCUBES-1:0]          vault_rsp_ready,
  output ar_events_t [NCUBES-1:0]       ev
);
  logic    [NCUBES-1:0][NPORTS-1:0]          in_valid, out_valid;
  ar_pkt_t [NCUBES-1:0][NPORTS-1:0]          in_pkt, out_pkt;
  logic    [NCUBES-1:0][NPORTS-1:0][NVC-1:0] in_ready, out_ready;

  for (genvar c = 0; c < NCUBES; c++) begin : g_cube
    localparam int G = c / 4;
    localparam int L = c % 4;

    for (genvar k = 0; k < NPORTS; k++) begin : g_port
      if (k != L) begin : g_intra
        // cube (G,k), its port L
        assign in_valid[c][k]  = out_valid[4*G+k][L];
        assign in_pkt[c][k]    = out_pkt[4*G+k][L];
        assign out_ready[c][k] = in_ready[4*G+k][L];
      end else if (L != G) begin : g_global
        // cube (L,G), its port G
        assign in_valid[c][k]  = out_valid[4*L+G][G];
        assign in_pkt[c][k]    = out_pkt[4*L+G][G];
        assign out_ready[c][k] = in_ready[4*L+G][G];
      end else begin : g_host
        assign in_valid[c][k]    = host_in_valid[G];
        assign in_pkt[c][k]      = host_in_pkt[G];
        assign out_ready[c][k]   = host_out_ready[G];
        assign host_in_ready[G]  = in_ready[c][k];
        assign host_out_valid[G] = out_valid[c][k];
        assign host_out_pkt[G]   = out_pkt[c][k];
      end
    end

    ar_cube #(.CUBE_ID(c), .FT_ENTRIES(FT_ENTRIES), .OB_ENTRIES(OB_ENTRIES),
              .ALU_LAT(ALU_LAT), .FIFO_DEPTH(FIFO_DEPTH)) u_cube (
      .clk, .rst_n,
      .lk_in_valid(in_valid[c]), .lk_in_pkt(in_pkt[c]), .lk_in_ready(in_ready[c]),
      .lk_out_valid(out_valid[c]), .lk_out_pkt(out_pkt[c]), .lk_out_ready(out_ready[c]),
      .vault_req_valid(vault_req_valid[c]), .vault_req_pkt(vault_req_pkt[c]),
      .vault_req_ready(vault_req_ready[c]),
      .vault_rsp_valid(vault_rsp_valid[c]), .vault_rsp_pkt(vault_rsp_pkt[c]),
      .vault_rsp_ready(vault_rsp_ready[c]),
      .ev(ev[c])
    );
  end

endmodule
