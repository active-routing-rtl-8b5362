// ar_vault_model: behavioural model (not synthesizable) of a cube's vault
// controllers and DRAM, as seen by the cube's switch. It answers every
// operand request after LAT cycles with an operand response carrying
// mem_value(address), the requester's buffer ID and operand select, sent
// back to the requesting cube. Responses leave in request order; the model
// accepts up to DEPTH outstanding requests.
module ar_vault_model
  import ar_pkg::*;
  import ar_tb_pkg::*;
#(
  parameter int LAT   = 20,
  parameter int DEPTH = 32
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    req_valid,
  input  ar_pkt_t req_pkt,
  output logic    req_ready,
  output logic    rsp_valid,
  output ar_pkt_t rsp_pkt,
  input  logic    rsp_ready
);
  typedef struct {
    ar_pkt_t pkt;
    longint  due;
  } pend_t;

  pend_t   pend [$];
  ar_pkt_t oq   [$];
  longint  cyc = 0;
  int      served = 0;

  function automatic ar_pkt_t answer(ar_pkt_t q);
    ar_pkt_t p;
    p          = '0;
    p.ptype    = PKT_OPND_RESP;
    p.flow_id  = q.flow_id;
    p.a        = mem_value(q.a);
    p.dst_cube = q.src_cube;
    p.src_cube = q.dst_cube;
    p.buf_id   = q.buf_id;
    p.sel      = q.sel;
    return p;
  endfunction

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend.delete();
      oq.delete();
      rsp_valid <= 1'b0;
      rsp_pkt   <= '0;
      req_ready <= 1'b0;
    end else begin
      pend_t e;
      if (rsp_valid && rsp_ready) void'(oq.pop_front());
      while (pend.size() != 0 && pend[0].due <= cyc) begin
        e = pend.pop_front();
        oq.push_back(e.pkt);
      end
      if (req_valid && req_ready) begin
        e.pkt = answer(req_pkt);
        e.due = cyc + longint'(LAT);
        pend.push_back(e);
        served++;
      end
      cyc <= cyc + 1;
      rsp_valid <= (oq.size() != 0);
      rsp_pkt   <= (oq.size() != 0) ? oq[0] : '0;
      req_ready <= (pend.size() + oq.size()) < DEPTH - 1;
    end
  end
endmodule
