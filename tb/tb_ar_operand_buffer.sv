// tb_ar_operand_buffer: self-checking testbench of the operand-buffer pool.
// Allocates every entry (the free queue must hand out each ID once and then
// run dry), fills operands in random order, and checks that each entry is
// issued exactly once, one cycle after its last operand, with its own flow
// ID, opcode and operands, and that issued IDs become free again.
module tb_ar_operand_buffer;
  import ar_pkg::*;
  import ar_tb_pkg::*;

  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              alloc_avail, alloc, alloc_op2_ready, wr_valid, wr_sel, iss_valid;
  logic [3:0]        alloc_id, wr_id;
  logic [63:0]       alloc_flow_id, alloc_op2, wr_data, iss_flow_id, iss_op1, iss_op2;
  ar_op_e            alloc_opcode, iss_opcode;
  logic [4:0]        free_count;

  ar_operand_buffer #(.ENTRIES(N)) dut (.*);

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

  logic [N-1:0] seen, issued, two;
  int           last_wr_cyc [N];
  int           cyc = 0;
  always @(posedge clk) cyc++;

  // issue monitor
  always @(negedge clk) if (rst_n && iss_valid) begin
    int id;
    id = int'(iss_flow_id[3:0]);
    ck("issued once", !issued[id]);
    issued[id] = 1'b1;
    ck("issue data", iss_flow_id == 64'h500 + 64'(id) && iss_opcode == (two[id] ? OP_MAC_I : OP_SUM_I)
                      && iss_op1 == 64'(id * 3 + 1) && iss_op2 == (two[id] ? 64'(id * 5 + 2) : 64'd0));
    ck("issue timing", cyc - last_wr_cyc[id] == 2);
  end

  initial begin
    int order [2*N];
    int n;
    alloc = 0; wr_valid = 0; alloc_op2_ready = 0; alloc_op2 = 0; alloc_flow_id = 0;
    alloc_opcode = OP_SUM_I; wr_id = 0; wr_sel = 0; wr_data = 0;
    seen = 0; issued = 0; two = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    ck("all free after reset", free_count == 5'(N) && alloc_avail);
    // allocate all; odd IDs two-operand, even IDs one-operand
    for (int i = 0; i < N; i++) begin
      ck("avail", alloc_avail);
      ck("fresh id", !seen[alloc_id]);
      seen[alloc_id] = 1'b1;
      two[alloc_id] = alloc_id[0];
      alloc = 1; alloc_flow_id = 64'h500 + 64'(alloc_id);
      alloc_opcode = alloc_id[0] ? OP_MAC_I : OP_SUM_I;
      alloc_op2_ready = !alloc_id[0]; alloc_op2 = 0;
      @(negedge clk);
      alloc = 0;
    end
    ck("pool exhausted", !alloc_avail && free_count == 0);
    // operand writes in shuffled order
    n = 0;
    for (int i = 0; i < N; i++) begin
      order[n++] = i;
      if (i % 2 == 1) order[n++] = i + 100;
    end
    for (int i = n - 1; i > 0; i--) begin
      int j, t;
      j = $urandom_range(i);
      t = order[i]; order[i] = order[j]; order[j] = t;
    end
    for (int i = 0; i < n; i++) begin
      int id;
      id = order[i] % 100;
      wr_valid = 1; wr_id = 4'(id); wr_sel = order[i] >= 100;
      wr_data = wr_sel ? 64'(id * 5 + 2) : 64'(id * 3 + 1);
      last_wr_cyc[id] = cyc;
      @(negedge clk);
      wr_valid = 0;
      if ($urandom_range(1)) @(negedge clk);
    end
    repeat (4) @(negedge clk);
    ck("every entry issued", issued == '1);
    ck("all free again", free_count == 5'(N));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
