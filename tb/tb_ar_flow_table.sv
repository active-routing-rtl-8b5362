// tb_ar_flow_table: self-checking testbench of the flow table.
// Registers flows until the table is full, checks both lookups and the free
// finder, then walks one flow through its life: children recorded,
// operations counted and completed, Gflag, children reporting, and checks
// that completion is signalled exactly when the Update Phase is over, Gflag
// is set and no child is pending; finally the entry is released.
module tb_ar_flow_table;
  import ar_pkg::*;
  import ar_tb_pkg::*;

  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [63:0] lk_key, lk2_key, cmd_flow_id, wb_result, done_flow_id, done_result, rd_result;
  logic        lk_hit, lk2_hit, free_avail, done_valid;
  logic [3:0]  lk_idx, lk2_idx, free_idx, rd_idx, ent_idx, cmd_idx, wb_idx, done_idx;
  ar_op_e      rd_opcode, ent_opcode, cmd_opcode;
  logic [3:0]  ent_children;
  logic [1:0]  ent_parent, cmd_port, wb_port, done_parent;
  logic        cmd_register, cmd_set_child, cmd_inc_req, cmd_set_gflag, cmd_release;
  logic        wb_valid, wb_is_child;
  logic [N-1:0] valid_o;

  ar_flow_table #(.ENTRIES(N)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ck(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic idle();
    cmd_register = 0; cmd_set_child = 0; cmd_inc_req = 0; cmd_set_gflag = 0; cmd_release = 0;
    wb_valid = 0; wb_is_child = 0;
  endtask

  initial begin
    idle();
    lk_key = 0; lk2_key = 0; cmd_flow_id = 0; cmd_idx = 0; cmd_port = 0; cmd_opcode = OP_SUM_I;
    wb_idx = 0; wb_result = 0; wb_port = 0; rd_idx = 0; ent_idx = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    ck("empty table has room", free_avail && free_idx == 0);

    // fill the table
    for (int i = 0; i < N; i++) begin
      ck("free index", free_avail && free_idx == 4'(i));
      cmd_register = 1; cmd_idx = free_idx; cmd_flow_id = 64'h1000 + 64'(i * 4);
      cmd_opcode = (i == 3) ? OP_AND : OP_SUM_I; cmd_port = 2'(i);
      @(negedge clk);
      idle();
    end
    ck("full table", !free_avail && valid_o == '1);
    for (int i = 0; i < N; i++) begin
      lk_key = 64'h1000 + 64'(i * 4); lk2_key = 64'h1000 + 64'((N - 1 - i) * 4);
      #1;
      ck("lookup 1", lk_hit && lk_idx == 4'(i));
      ck("lookup 2", lk2_hit && lk2_idx == 4'(N - 1 - i));
    end
    lk_key = 64'h999; #1; ck("miss", !lk_hit);
    rd_idx = 3; #1; ck("identity of AND", rd_result == '1 && rd_opcode == OP_AND);
    ent_idx = 5; #1; ck("parent recorded", ent_parent == 2'd1 && ent_children == 0);

    @(negedge clk);
    // flow in entry 5: two children, three operations
    cmd_idx = 5;
    cmd_set_child = 1; cmd_port = 2; @(negedge clk); idle();
    cmd_set_child = 1; cmd_port = 0; @(negedge clk); idle();
    #1; ck("children recorded", ent_children == 4'b0101);
    repeat (3) begin cmd_inc_req = 1; @(negedge clk); idle(); end
    // operations finish: result and resp_counter updated
    wb_valid = 1; wb_idx = 5; wb_result = 64'd10; @(negedge clk); idle();
    wb_valid = 1; wb_idx = 5; wb_result = 64'd30;
    cmd_set_gflag = 1;                    // same cycle as a write-back
    @(negedge clk); idle();
    ck("not done: 1 op and 2 children pending", !done_valid);
    wb_valid = 1; wb_idx = 5; wb_result = 64'd60; @(negedge clk); idle();
    ck("not done: children pending", !done_valid);
    wb_valid = 1; wb_is_child = 1; wb_idx = 5; wb_port = 2; wb_result = 64'd70;
    @(negedge clk); idle();
    #1; ck("child 2 cleared", ent_children == 4'b0001);
    ck("not done: child 0 pending", !done_valid);
    wb_valid = 1; wb_is_child = 1; wb_idx = 5; wb_port = 0; wb_result = 64'd75;
    @(negedge clk); idle();
    #1;
    ck("done", done_valid && done_idx == 5 && done_result == 64'd75 &&
               done_flow_id == 64'h1000 + 64'd20 && done_parent == 2'd1);
    // child set while a child clears in the same cycle: set wins
    cmd_idx = 6; cmd_set_child = 1; cmd_port = 1;
    @(negedge clk); idle();
    cmd_idx = 6; cmd_set_child = 1; cmd_port = 1;
    wb_valid = 1; wb_is_child = 1; wb_idx = 6; wb_port = 1; wb_result = 0;
    @(negedge clk); idle();
    ent_idx = 6; #1; ck("set wins over clear", ent_children[1]);

    cmd_idx = 5; cmd_release = 1; @(negedge clk); idle();
    #1;
    ck("released", free_avail && free_idx == 5 && !done_valid);
    lk_key = 64'h1000 + 64'd20; #1; ck("released flow misses", !lk_hit);
    @(negedge clk);
    // flow in entry 7: no children, two operations still in flight at Gather
    cmd_idx = 7;
    repeat (2) begin cmd_inc_req = 1; @(negedge clk); idle(); end
    cmd_set_gflag = 1; @(negedge clk); idle();
    #1; ck("not done: two operations pending", !done_valid);
    wb_valid = 1; wb_idx = 7; wb_result = 64'd5; @(negedge clk); idle();
    #1; ck("not done: one operation pending", !done_valid);
    wb_valid = 1; wb_idx = 7; wb_result = 64'd9; @(negedge clk); idle();
    #1; ck("done after the last operation", done_valid && done_idx == 7 && done_result == 64'd9);
    @(negedge clk);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
