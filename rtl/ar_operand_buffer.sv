// ar_operand_buffer: the pool of operand buffers of an Active-Routing Engine.
//
// Each entry holds what the document's operand-buffer entry holds: flow ID
// (64 b), opcode (6 b), operand1 (64 b) with its ready flag and operand2
// (64 b) with its ready flag. The pool (128 entries in the document) is shared
// by all flows. As in the document, a free queue and a ready queue of entry
// IDs avoid searching the pool:
//  * alloc: the packet processing unit takes the ID at the head of the free
//    queue (alloc_avail says one is there) and writes flow ID and opcode. A
//    one-operand operation has operand2 marked ready at once; an immediate
//    second operand is written with it.
//  * wr: an operand response writes operand1 or operand2 of an entry. When
//    this makes both operands ready, the ID joins the ready queue.
//  * issue: whenever the ready queue is not empty, its head entry is read
//    into a register (one cycle of buffer access), presented to the ALU on
//    iss_valid for one cycle, and the ID returns to the free queue.
// Entry storage is not reset; the ready flags are.
module ar_operand_buffer
  import ar_pkg::*;
#(
  parameter int unsigned ENTRIES = 128
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // allocation
  output logic                       alloc_avail,
  output logic [$clog2(ENTRIES)-1:0] alloc_id,
  input  logic                       alloc,
  input  logic [63:0]                alloc_flow_id,
  input  ar_op_e                     alloc_opcode,
  input  logic                       alloc_op2_ready,
  input  logic [63:0]                alloc_op2,
  // operand write
  input  logic                       wr_valid,
  input  logic [$clog2(ENTRIES)-1:0] wr_id,
  input  logic                       wr_sel,
  input  logic [63:0]                wr_data,
  // issue to the ALU
  output logic                       iss_valid,
  output logic [63:0]                iss_flow_id,
  output ar_op_e                     iss_opcode,
  output logic [63:0]                iss_op1,
  output logic [63:0]                iss_op2,
  output logic [$clog2(ENTRIES+1)-1:0] free_count
);
  localparam int IW = $clog2(ENTRIES);
  typedef logic [IW-1:0] id_t;

  typedef struct packed {
    logic [63:0] flow_id;
    ar_op_e      opcode;
    logic [63:0] operand1;
    logic [63:0] operand2;
  } ob_data_t;

  ob_data_t           ent [ENTRIES];
  logic [ENTRIES-1:0] op1_ready, op2_ready;

  logic rq_push, rq_valid, rq_pop;
  id_t  rq_head;
  logic fq_wr_ready, rq_wr_ready;

  ar_fifo #(.T(id_t), .DEPTH(ENTRIES), .INIT_SEQ(1'b1)) u_free_q (
    .clk, .rst_n,
    .wr_valid(rq_pop), .wr_ready(fq_wr_ready), .wr_data(rq_head),
    .rd_valid(alloc_avail), .rd_ready(alloc), .rd_data(alloc_id),
    .count(free_count)
  );

  // an operand write completes the entry when the other operand is ready
  assign rq_push = wr_valid && (wr_sel ? op1_ready[wr_id] : op2_ready[wr_id]);

  ar_fifo #(.T(id_t), .DEPTH(ENTRIES), .INIT_SEQ(1'b0)) u_ready_q (
    .clk, .rst_n,
    .wr_valid(rq_push), .wr_ready(rq_wr_ready), .wr_data(wr_id),
    .rd_valid(rq_valid), .rd_ready(1'b1), .rd_data(rq_head),
    .count()
  );
  assign rq_pop = rq_valid;

  always_ff @(posedge clk) begin
    if (alloc) begin
      ent[alloc_id].flow_id  <= alloc_flow_id;
      ent[alloc_id].opcode   <= alloc_opcode;
      if (alloc_op2_ready) ent[alloc_id].operand2 <= alloc_op2;
    end
    if (wr_valid) begin
      if (wr_sel) ent[wr_id].operand2 <= wr_data;
      else        ent[wr_id].operand1 <= wr_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op1_ready <= '0;
      op2_ready <= '0;
    end else begin
      if (alloc) begin
        op1_ready[alloc_id] <= 1'b0;
        op2_ready[alloc_id] <= alloc_op2_ready;
      end
      if (wr_valid) begin
        if (wr_sel) op2_ready[wr_id] <= 1'b1;
        else        op1_ready[wr_id] <= 1'b1;
      end
      if (rq_pop) begin
        op1_ready[rq_head] <= 1'b0;
        op2_ready[rq_head] <= 1'b0;
      end
    end
  end

  // one cycle of buffer access on the way to the ALU
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iss_valid <= 1'b0;
    end else begin
      iss_valid <= rq_pop;
    end
  end

  always_ff @(posedge clk) begin
    if (rq_pop) begin
      iss_flow_id <= ent[rq_head].flow_id;
      iss_opcode  <= ent[rq_head].opcode;
      iss_op1     <= ent[rq_head].operand1;
      iss_op2     <= ent[rq_head].operand2;
    end
  end

  a_no_ready_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    rq_push |-> rq_wr_ready);
  a_no_free_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    rq_pop |-> fq_wr_ready);
  a_alloc_avail: assert property (@(posedge clk) disable iff (!rst_n)
    alloc |-> alloc_avail);

endmodule
