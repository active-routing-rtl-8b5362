// ar_alu: the arithmetic unit of an Active-Routing Engine.
//
// Two parts, as in the engine's datapath, where the ALU takes one input from
// the operand buffers and one from the flow table and writes its result back
// to the flow table through an output register:
//  * a pipeline of LAT stages (9 in the document: a multiply takes 9 cycles
//    at 1250 MHz) that turns the one or two operands of an operation into the
//    value it contributes (a product for multiply-accumulate, |a - b| for the
//    absolute difference, the operand itself for the plain reductions). It
//    accepts one operation per cycle and never stalls. The arithmetic is
//    written as one function whose result is delayed through LAT registers;
//    synthesis is expected to retime it into the stages.
//  * a reduce stage that folds a value into the flow's partial result:
//    either the pipeline's output (found in the flow table by flow ID) or a
//    partial result gathered from a child (agg_* port, from the packet
//    processing unit). The pipeline has priority; agg_ready is low while a
//    pipeline result is being reduced. The new partial result is registered
//    and written back to the flow table the next cycle. When the next
//    reduction targets the flow still sitting in the output register, its
//    value is taken from the register (a bypass), so back-to-back
//    reductions of one flow are exact.
module ar_alu
  import ar_pkg::*;
#(
  parameter int unsigned LAT        = 9,
  parameter int unsigned FT_ENTRIES = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // operation from the operand buffers
  input  logic                          in_valid,
  input  logic [63:0]                   in_flow_id,
  input  ar_op_e                        in_opcode,
  input  logic [63:0]                   in_op1,
  input  logic [63:0]                   in_op2,
  // gathered partial result from a child
  input  logic                          agg_valid,
  output logic                          agg_ready,
  input  logic [$clog2(FT_ENTRIES)-1:0] agg_idx,
  input  logic [PORT_W-1:0]             agg_port,
  input  logic [63:0]                   agg_value,
  // flow table access
  output logic [63:0]                   ft_key,
  input  logic                          ft_hit,
  input  logic [$clog2(FT_ENTRIES)-1:0] ft_idx,
  output logic [$clog2(FT_ENTRIES)-1:0] ft_rd_idx,
  input  ar_op_e                        ft_rd_opcode,
  input  logic [63:0]                   ft_rd_result,
  // write-back
  output logic                          wb_valid,
  output logic [$clog2(FT_ENTRIES)-1:0] wb_idx,
  output logic [63:0]                   wb_result,
  output logic                          wb_is_child,
  output logic [PORT_W-1:0]             wb_port,
  output logic                          bypass_o
);
  localparam int IW = $clog2(FT_ENTRIES);

  typedef struct packed {
    logic        valid;
    logic [63:0] flow_id;
    logic [63:0] value;
  } stage_t;

  stage_t pipe [LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) pipe[i] <= '0;
    end else begin
      pipe[0].valid   <= in_valid;
      pipe[0].flow_id <= in_flow_id;
      pipe[0].value   <= ar_map(in_opcode, in_op1, in_op2);
      for (int i = 1; i < LAT; i++) pipe[i] <= pipe[i-1];
    end
  end

  // reduce stage
  logic        red_valid, red_child;
  logic [63:0] red_value, acc, new_result;
  logic [IW-1:0] red_idx;

  assign ft_key    = pipe[LAT-1].flow_id;
  assign agg_ready = !pipe[LAT-1].valid;

  always_comb begin
    if (pipe[LAT-1].valid) begin
      red_valid = ft_hit;
      red_child = 1'b0;
      red_idx   = ft_idx;
      red_value = pipe[LAT-1].value;
    end else begin
      red_valid = agg_valid;
      red_child = 1'b1;
      red_idx   = agg_idx;
      red_value = agg_value;
    end
  end

  assign ft_rd_idx  = red_idx;
  assign bypass_o   = red_valid && wb_valid && (wb_idx == red_idx);
  assign acc        = bypass_o ? wb_result : ft_rd_result;
  assign new_result = ar_combine(ft_rd_opcode, acc, red_value);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_valid    <= 1'b0;
      wb_idx      <= '0;
      wb_result   <= '0;
      wb_is_child <= 1'b0;
      wb_port     <= '0;
    end else begin
      wb_valid    <= red_valid;
      wb_idx      <= red_idx;
      wb_result   <= new_result;
      wb_is_child <= red_child;
      wb_port     <= agg_port;
    end
  end

  // every finished operation belongs to a registered flow
  a_flow_known: assert property (@(posedge clk) disable iff (!rst_n)
    pipe[LAT-1].valid |-> ft_hit);

endmodule
