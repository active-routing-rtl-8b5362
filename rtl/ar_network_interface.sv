// ar_network_interface: the Active-Routing part of a core's network
// interface.
//
// Extended instructions write a set of dedicated registers; a write to the
// ISSUE register assembles them into one Update or Gather command for the
// HMC controllers, tagged with the core's thread ID. Register map (64-bit
// writes, wr_addr):
//   0 SRC1      first operand address
//   1 SRC2      second operand address, or its value for regular-irregular
//   2 TARGET    address of the reduced variable (identifies the flow)
//   3 CTRL      [5:0] opcode, [9:8] access pattern (0 regular-regular,
//               1 regular-irregular, 2 irregular-irregular), [19:16] number
//               of elements for regular-regular (1..8, one 64-byte block)
//   4 NTHREADS  threads that will send a Gather for the flow
//   5 ISSUE     [0] 0 = Update, 1 = Gather
// The command waits on cmd_valid until cmd_ready; meanwhile wr_ready is low,
// so the core stalls on its next register write. The register map, the
// encodings and the stall are this design's own choices; the document gives
// the register idea and the three access-pattern variants.
module ar_network_interface
  import ar_pkg::*;
#(
  parameter int unsigned CORE_ID = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_valid,
  output logic        wr_ready,
  input  logic [2:0]  wr_addr,
  input  logic [63:0] wr_data,
  output logic        cmd_valid,
  output ar_cmd_t     cmd,
  input  logic        cmd_ready
);
  localparam logic [2:0] R_SRC1 = 3'd0, R_SRC2 = 3'd1, R_TARGET = 3'd2, R_CTRL = 3'd3,
                         R_NTHREADS = 3'd4, R_ISSUE = 3'd5;

  logic [63:0] src1, src2, target;
  ar_op_e      opcode;
  logic [1:0]  pattern;
  logic [3:0]  count;
  logic [7:0]  nthreads;

  assign wr_ready = !cmd_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      src1 <= '0; src2 <= '0; target <= '0; opcode <= OP_SUM_I;
      pattern <= '0; count <= 4'd1; nthreads <= 8'd1;
      cmd_valid <= 1'b0;
      cmd <= '0;
    end else begin
      if (cmd_valid && cmd_ready) cmd_valid <= 1'b0;
      if (wr_valid && wr_ready) begin
        case (wr_addr)
          R_SRC1:     src1     <= wr_data;
          R_SRC2:     src2     <= wr_data;
          R_TARGET:   target   <= wr_data;
          R_CTRL: begin
            opcode  <= ar_op_e'(wr_data[5:0]);
            pattern <= wr_data[9:8];
            count   <= wr_data[19:16];
          end
          R_NTHREADS: nthreads <= wr_data[7:0];
          R_ISSUE: begin
            cmd_valid     <= 1'b1;
            cmd.is_gather <= wr_data[0];
            cmd.tid       <= 8'(CORE_ID);
            cmd.opcode    <= opcode;
            cmd.src1      <= src1;
            cmd.src2      <= src2;
            cmd.two_opnd  <= ar_two_operand(opcode);
            cmd.imm2      <= (pattern == 2'd1);
            cmd.count     <= (pattern == 2'd0 && count != 0) ? count : 4'd1;
            cmd.target    <= target;
            cmd.nthreads  <= nthreads;
          end
          default: ;
        endcase
      end
    end
  end

  a_count_max: assert property (@(posedge clk) disable iff (!rst_n)
    cmd_valid |-> cmd.count <= 4'(MAX_COUNT));

endmodule
