// tb_ar_network_interface: register writes and command assembly of one
// core's Active-Routing network interface (CORE_ID 5).
// Checks, for each of the three access patterns, that the ISSUE write
// produces exactly one command with the written fields, the thread ID, the
// pattern-derived immediate/count fields, and that register writes stall
// (wr_ready low) while the command waits for cmd_ready.
module tb_ar_network_interface;
  import ar_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_valid, wr_ready, cmd_valid, cmd_ready;
  logic [2:0] wr_addr;
  logic [63:0] wr_data;
  ar_cmd_t cmd;

  ar_network_interface #(.CORE_ID(5)) dut (.*);

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

  task automatic wr(logic [2:0] a, logic [63:0] d);
    @(negedge clk);
    while (!wr_ready) @(negedge clk);
    wr_valid = 1; wr_addr = a; wr_data = d;
    @(negedge clk);
    wr_valid = 0;
  endtask

  int ncmd = 0;
  always @(posedge clk) if (rst_n && cmd_valid && cmd_ready) ncmd++;

  initial begin
    wr_valid = 0; wr_addr = 0; wr_data = 0; cmd_ready = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int pat = 0; pat < 3; pat++) begin
      int n0;
      n0 = ncmd;
      wr(0, 64'h3_0000_1000 + 64'(pat));
      wr(1, 64'h7_0000_2000 + 64'(pat));
      wr(2, 64'h1_0000_0040);
      wr(3, 64'(OP_MAC_F) | (64'(pat) << 8) | (64'd6 << 16));
      wr(4, 64'd16);
      wr(5, 64'(pat == 2));
      @(negedge clk);
      ck("command pending", cmd_valid);
      ck("core stalls while pending", !wr_ready);
      ck("fields", cmd.src1 == 64'h3_0000_1000 + 64'(pat) && cmd.src2 == 64'h7_0000_2000 + 64'(pat) &&
                   cmd.target == 64'h1_0000_0040 && cmd.opcode == OP_MAC_F && cmd.nthreads == 16);
      ck("thread id", cmd.tid == 8'd5);
      ck("two operands for MAC", cmd.two_opnd);
      ck("gather flag", cmd.is_gather == (pat == 2));
      ck("immediate second operand only for RI", cmd.imm2 == (pat == 1));
      ck("block count only for RR", cmd.count == ((pat == 0) ? 4'd6 : 4'd1));
      repeat (3) @(negedge clk);
      ck("still held", cmd_valid && ncmd == n0);
      cmd_ready = 1;
      @(negedge clk);
      cmd_ready = 0;
      ck("exactly one command", ncmd == n0 + 1 && !cmd_valid && wr_ready);
    end
    // one-operand opcode
    wr(3, 64'(OP_SUM_I));
    wr(5, 64'd0);
    @(negedge clk);
    ck("sum is one-operand", cmd_valid && !cmd.two_opnd && cmd.opcode == OP_SUM_I);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
