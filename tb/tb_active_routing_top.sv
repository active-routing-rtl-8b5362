// tb_active_routing_top: end-to-end test of the Active-Routing system at
// reduced size (4 cores, 8 operand buffers per engine so that Updates stall
// on a full pool). Workloads, checks and mechanism counts: ar_sys_driver.
module tb_active_routing_top;
  import ar_pkg::*;
  localparam int NC = 4;

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

  active_routing_top #(.NCORES(NC), .OB_ENTRIES(8)) dut (.*);

  ar_sys_driver #(.NCORES(NC), .NBLK(6), .NSCALAR(24), .VAULT_LAT(40),
                  .REQUIRE_STALL(1'b1), .TIMEOUT(20000)) drv (.*);
endmodule
