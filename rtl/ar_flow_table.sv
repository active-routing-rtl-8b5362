// ar_flow_table: the flow table of an Active-Routing Engine.
//
// Each entry is one node of an Active-Routing tree for one flow, with the
// fields of the document's flow-table entry: flow ID (64 b), opcode (6 b),
// partial result (64 b), req_counter and resp_counter (64 b each), parent
// port (2 b), one child flag per link port (4 b) and Gflag (1 b), plus a
// valid bit. The document gives 16 entries.
//
// Ports
//  * two fully associative lookups by flow ID (packet processing unit, ALU)
//    and a free-entry finder;
//  * a command port for the packet processing unit: register a flow (result
//    starts at the operation's identity), set a child flag, count an issued
//    operation (req_counter), set Gflag, release an entry;
//  * a write-back port for the ALU: a new partial result, either for a
//    finished operation (resp_counter + 1) or for a child's gather response
//    (that child's flag is cleared);
//  * a completion detector: the lowest entry whose Update Phase is over
//    (req_counter == resp_counter), whose Gflag is set and whose child flags
//    are all clear. Its subtree is done and it may report to its parent.
// Lookups and reads are combinational; every update lands at the clock edge.
// A command and a write-back may hit the same entry in one cycle: they touch
// different fields, and a child flag being set wins over its being cleared.
module ar_flow_table
  import ar_pkg::*;
#(
  parameter int unsigned ENTRIES = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // lookup for the packet processing unit
  input  logic [63:0]                lk_key,
  output logic                       lk_hit,
  output logic [$clog2(ENTRIES)-1:0] lk_idx,
  // lookup for the ALU
  input  logic [63:0]                lk2_key,
  output logic                       lk2_hit,
  output logic [$clog2(ENTRIES)-1:0] lk2_idx,
  // free entry
  output logic                       free_avail,
  output logic [$clog2(ENTRIES)-1:0] free_idx,
  // entry reads
  input  logic [$clog2(ENTRIES)-1:0] rd_idx,
  output ar_op_e                     rd_opcode,
  output logic [63:0]                rd_result,
  input  logic [$clog2(ENTRIES)-1:0] ent_idx,
  output logic [NPORTS-1:0]          ent_children,
  output logic [PORT_W-1:0]          ent_parent,
  output ar_op_e                     ent_opcode,
  // commands from the packet processing unit
  input  logic                       cmd_register,
  input  logic                       cmd_set_child,
  input  logic                       cmd_inc_req,
  input  logic                       cmd_set_gflag,
  input  logic                       cmd_release,
  input  logic [$clog2(ENTRIES)-1:0] cmd_idx,
  input  logic [63:0]                cmd_flow_id,
  input  ar_op_e                     cmd_opcode,
  input  logic [PORT_W-1:0]          cmd_port,
  // write-back from the ALU
  input  logic                       wb_valid,
  input  logic [$clog2(ENTRIES)-1:0] wb_idx,
  input  logic [63:0]                wb_result,
  input  logic                       wb_is_child,
  input  logic [PORT_W-1:0]          wb_port,
  // completed subtree
  output logic                       done_valid,
  output logic [$clog2(ENTRIES)-1:0] done_idx,
  output logic [63:0]                done_flow_id,
  output logic [63:0]                done_result,
  output logic [PORT_W-1:0]          done_parent,
  output logic [ENTRIES-1:0]         valid_o
);
  localparam int IW = $clog2(ENTRIES);

  typedef struct packed {
    logic [63:0]       flow_id;
    ar_op_e            opcode;
    logic [63:0]       result;
    logic [63:0]       req_counter;
    logic [63:0]       resp_counter;
    logic [PORT_W-1:0] parent;
    logic [NPORTS-1:0] children;
    logic              gflag;
  } flow_entry_t;

  flow_entry_t      tab [ENTRIES];
  logic [ENTRIES-1:0] valid;

  assign valid_o = valid;

  always_comb begin
    lk_hit = 1'b0; lk_idx = '0;
    lk2_hit = 1'b0; lk2_idx = '0;
    free_avail = 1'b0; free_idx = '0;
    done_valid = 1'b0; done_idx = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (valid[i] && tab[i].flow_id == lk_key)  begin lk_hit = 1'b1;  lk_idx = IW'(i);  end
      if (valid[i] && tab[i].flow_id == lk2_key) begin lk2_hit = 1'b1; lk2_idx = IW'(i); end
      if (!valid[i]) begin free_avail = 1'b1; free_idx = IW'(i); end
      if (valid[i] && tab[i].gflag && tab[i].children == '0 &&
          tab[i].req_counter == tab[i].resp_counter) begin
        done_valid = 1'b1; done_idx = IW'(i);
      end
    end
  end

  assign rd_opcode    = tab[rd_idx].opcode;
  assign rd_result    = tab[rd_idx].result;
  assign ent_children = tab[ent_idx].children;
  assign ent_parent   = tab[ent_idx].parent;
  assign ent_opcode   = tab[ent_idx].opcode;
  assign done_flow_id = tab[done_idx].flow_id;
  assign done_result  = tab[done_idx].result;
  assign done_parent  = tab[done_idx].parent;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
      for (int i = 0; i < ENTRIES; i++) tab[i] <= '0;
    end else begin
      for (int i = 0; i < ENTRIES; i++) begin
        // ALU write-back
        if (wb_valid && wb_idx == IW'(i)) begin
          tab[i].result <= wb_result;
          if (wb_is_child) tab[i].children[wb_port] <= 1'b0;
          else             tab[i].resp_counter <= tab[i].resp_counter + 1;
        end
        // packet processing unit
        if (cmd_idx == IW'(i)) begin
          if (cmd_register) begin
            valid[i]            <= 1'b1;
            tab[i].flow_id      <= cmd_flow_id;
            tab[i].opcode       <= cmd_opcode;
            tab[i].result       <= ar_identity(cmd_opcode);
            tab[i].req_counter  <= '0;
            tab[i].resp_counter <= '0;
            tab[i].parent       <= cmd_port;
            tab[i].children     <= '0;
            tab[i].gflag        <= 1'b0;
          end
          if (cmd_set_child) tab[i].children[cmd_port] <= 1'b1;
          if (cmd_inc_req)   tab[i].req_counter <= tab[i].req_counter + 1;
          if (cmd_set_gflag) tab[i].gflag <= 1'b1;
          if (cmd_release)   valid[i] <= 1'b0;
        end
      end
    end
  end

  // a command may only address a live entry, except a registration
  a_cmd_live: assert property (@(posedge clk) disable iff (!rst_n)
    (cmd_set_child || cmd_inc_req || cmd_set_gflag || cmd_release) |-> valid[cmd_idx]);
  a_wb_live: assert property (@(posedge clk) disable iff (!rst_n)
    wb_valid |-> valid[wb_idx]);
  a_reg_free: assert property (@(posedge clk) disable iff (!rst_n)
    cmd_register |-> !valid[cmd_idx]);

endmodule
