// ar_fifo: synchronous first-in first-out queue used for the link input
// buffers of the router and the free / ready queues of the operand buffer.
//
// Valid / ready on both sides: a word is written when wr_valid && wr_ready
// and removed when rd_valid && rd_ready. The head is visible combinationally
// (rd_data is the oldest word). Writing and reading in the same cycle is
// allowed; wr_ready depends only on the fill level, so no
// combinational path runs from rd_ready to wr_ready. With INIT_SEQ set the
// queue leaves reset full, holding 0, 1, .., DEPTH-1 (the free list of the
// operand buffer).
module ar_fifo #(
  parameter type         T        = logic [7:0],
  parameter int unsigned DEPTH    = 4,
  parameter bit          INIT_SEQ = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic wr_valid,
  output logic wr_ready,
  input  T     wr_data,
  output logic rd_valid,
  input  logic rd_ready,
  output T     rd_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  T                mem [DEPTH];
  logic [AW-1:0]   rd_ptr, wr_ptr;
  logic            do_wr, do_rd;

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign rd_valid = (count != 0);
  assign rd_data  = mem[rd_ptr];
  assign wr_ready = (count != ($clog2(DEPTH+1))'(DEPTH));
  assign do_wr    = wr_valid && wr_ready;
  assign do_rd    = rd_valid && rd_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      if (INIT_SEQ) begin
        wr_ptr <= '0;
        count  <= ($clog2(DEPTH+1))'(DEPTH);
      end else begin
        wr_ptr <= '0;
        count  <= '0;
      end
    end else begin
      if (do_wr) wr_ptr <= inc(wr_ptr);
      if (do_rd) rd_ptr <= inc(rd_ptr);
      count <= count + CW'(do_wr) - CW'(do_rd);
    end
  end

  // storage: no reset except the initial free list
  if (INIT_SEQ) begin : g_init
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < DEPTH; i++) mem[i] <= T'(i);
      end else if (do_wr) begin
        mem[wr_ptr] <= wr_data;
      end
    end
  end else begin : g_plain
    always_ff @(posedge clk) begin
      if (do_wr) mem[wr_ptr] <= wr_data;
    end
  end

endmodule
