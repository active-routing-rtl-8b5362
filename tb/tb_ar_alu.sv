// tb_ar_alu: self-checking testbench of the engine ALU.
// A small model of the flow table (16 partial results) surrounds the ALU.
// Checks: every opcode against the reference map/combine on random operands
// (doubles compared bit for bit with the simulator's IEEE arithmetic), the
// pipeline latency (LAT + 1 cycles from issue to write-back), one result per
// cycle with the bypass of back-to-back reductions of one flow, and the
// gather path (child partial results, held off while the pipeline delivers).
module tb_ar_alu;
  import ar_pkg::*;
  import ar_tb_pkg::*;

  localparam int LAT = 9;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid;
  logic [63:0] in_flow_id, in_op1, in_op2;
  ar_op_e      in_opcode;
  logic        agg_valid, agg_ready;
  logic [3:0]  agg_idx, ft_idx, ft_rd_idx, wb_idx;
  logic [1:0]  agg_port, wb_port;
  logic [63:0] agg_value, ft_key, ft_rd_result, wb_result;
  logic        wb_valid, wb_is_child, bypass;
  ar_op_e      ft_rd_opcode;

  logic [63:0] acc [16];
  ar_op_e      opc [16];

  ar_alu #(.LAT(LAT), .FT_ENTRIES(16)) dut (
    .clk, .rst_n, .in_valid, .in_flow_id, .in_opcode, .in_op1, .in_op2,
    .agg_valid, .agg_ready, .agg_idx, .agg_port, .agg_value,
    .ft_key, .ft_hit(1'b1), .ft_idx, .ft_rd_idx, .ft_rd_opcode, .ft_rd_result,
    .wb_valid, .wb_idx, .wb_result, .wb_is_child, .wb_port, .bypass_o(bypass)
  );

  assign ft_idx       = ft_key[3:0];
  assign ft_rd_opcode = opc[ft_rd_idx];
  assign ft_rd_result = acc[ft_rd_idx];
  always_ff @(posedge clk) if (wb_valid) acc[wb_idx] <= wb_result;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;
  int nbyp = 0;
  always @(posedge clk) if (bypass) nbyp++;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  ar_op_e ops [11] = '{OP_SUM_I, OP_SUM_F, OP_XOR, OP_AND, OP_MIN_I, OP_MAX_I,
                       OP_MIN_F, OP_MAX_F, OP_MAC_I, OP_MAC_F, OP_ABSDIFF_F};

  // one operation on flow 2 starting from start; returns result and latency
  task automatic one_op(ar_op_e op, logic [63:0] start, logic [63:0] a, logic [63:0] b);
    int t0, lat;
    logic [63:0] exp;
    opc[2] = op;
    acc[2] = start;
    @(negedge clk);
    in_valid = 1; in_flow_id = 64'h100 | 64'd2; in_opcode = op; in_op1 = a; in_op2 = b;
    t0 = cyc;
    @(negedge clk);
    in_valid = 0;
    while (!wb_valid) @(negedge clk);
    lat = cyc - t0;
    exp = ref_combine(op, start, ref_map(op, a, b));
    check($sformatf("op %0d", op), wb_result, exp);
    checks++;
    if (lat != LAT + 1) begin failures++; $display("FAIL latency %0d", lat); end
    if (wb_is_child) begin failures++; $display("FAIL wb_is_child"); end
    @(negedge clk);
  endtask

  initial begin
    real sum;
    in_valid = 0; agg_valid = 0; agg_idx = 0; agg_port = 0; agg_value = 0;
    in_flow_id = 0; in_opcode = OP_SUM_I; in_op1 = 0; in_op2 = 0;
    for (int i = 0; i < 16; i++) begin acc[i] = 0; opc[i] = OP_SUM_I; end
    repeat (3) @(negedge clk);
    rst_n = 1;

    // every opcode on random operands
    foreach (ops[k]) begin
      for (int n = 0; n < 25; n++) begin
        logic [63:0] a, b, s;
        if (ops[k] inside {OP_SUM_F, OP_MIN_F, OP_MAX_F, OP_MAC_F, OP_ABSDIFF_F}) begin
          a = rand_double(30); b = rand_double(30); s = rand_double(30);
          if (n == 0) s = ref_identity(ops[k]);
        end else begin
          a = {$urandom(), $urandom()}; b = {$urandom(), $urandom()}; s = {$urandom(), $urandom()};
          if (n == 0) s = ref_identity(ops[k]);
        end
        one_op(ops[k], s, a, b);
      end
    end

    // back-to-back stream into one flow: exact integer-valued doubles
    opc[7] = OP_MAC_F; acc[7] = 0; sum = 0.0; nbyp = 0;
    for (int n = 0; n < 40; n++) begin
      real x, y;
      x = real'($urandom_range(200)) - 100.0;
      y = real'($urandom_range(200)) - 100.0;
      sum += x * y;
      @(negedge clk);
      in_valid = 1; in_flow_id = 64'd7; in_opcode = OP_MAC_F;
      in_op1 = $realtobits(x); in_op2 = $realtobits(y);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (LAT + 3) @(negedge clk);
    check("stream sum", acc[7], $realtobits(sum));
    checks++;
    if (nbyp != 39) begin failures++; $display("FAIL bypass used %0d times", nbyp); end

    // gather path
    opc[5] = OP_SUM_I; acc[5] = 64'd1000;
    @(negedge clk);
    agg_valid = 1; agg_idx = 5; agg_port = 2'd3; agg_value = 64'd234;
    checks++;
    if (!agg_ready) begin failures++; $display("FAIL agg_ready low on idle ALU"); end
    @(negedge clk);
    agg_valid = 0;
    checks++;
    if (!(wb_valid && wb_is_child && wb_port == 2'd3 && wb_idx == 4'd5)) begin
      failures++; $display("FAIL gather write-back");
    end
    @(negedge clk);
    check("gather result", acc[5], 64'd1234);

    // pipeline output holds off a gather
    opc[1] = OP_SUM_I; acc[1] = 0;
    @(negedge clk);
    in_valid = 1; in_flow_id = 64'd1; in_opcode = OP_SUM_I; in_op1 = 64'd5;
    @(negedge clk);
    in_valid = 0;
    repeat (LAT - 1) @(negedge clk);
    checks++;
    if (agg_ready) begin failures++; $display("FAIL agg_ready high while pipeline delivers"); end
    repeat (3) @(negedge clk);
    check("sum after hold-off", acc[1], 64'd5);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
