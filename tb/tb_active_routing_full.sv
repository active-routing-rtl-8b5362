// tb_active_routing_full: the Active-Routing system at its default size
// (16 cores, 16 cubes, 16 flow-table and 128 operand-buffer entries per
// engine, 9-cycle ALU) running the same five phases as the reduced test:
// regular MAC with ART-addr, reduction with ART-tid, regular-irregular MAC,
// three concurrent flows and an absolute-difference sum. Checks and
// mechanism counts: ar_sys_driver. Operand-buffer stalls are counted but
// not required here: with 128 buffers the pool rarely fills.
module tb_active_routing_full;
  import ar_pkg::*;
  localparam int NC = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                      rst_n, root_mode;
  logic    [NC-1:0]          ni_wr_valid, ni_wr_ready, ni_cmd_valid, ni_cmd_ready;
  logic    [NC-1:0][2:0]     ni_wr_addr;
  logic    [NC-1:0][63:0]    ni_wr_data;
  ar_cmd_t [NC-1:0]          ni_cmd;
  logic                      hc_cmd_valid, hc_cmd_ready, commit_valid;
  ar_cmd_t                   hc_cmd;
  logic [63:0]               commit_target, commit_result;
  ar_op_e                    commit_opcode;
  logic    [NCUBES-1:0]      vault_req_valid, vault_req_ready, vault_rsp_valid, vault_rsp_ready;
  ar_pkt_t [NCUBES-1:0]      vault_req_pkt, vault_rsp_pkt;
  ar_events_t [NCUBES-1:0]   ev;

  active_routing_top dut (.*);

  ar_sys_driver #(.NCORES(NC), .NBLK(6), .NSCALAR(24), .VAULT_LAT(40),
                  .REQUIRE_STALL(1'b0)) drv (.*);
endmodule
