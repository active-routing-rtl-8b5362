// ar_pkg: types, constants and pure functions shared by the Active-Routing
// memory-network design.
//
// Contents
//  * Opcodes of the Active-Routing Engine (6 bits, as in the flow-table and
//    operand-buffer entries) and the packet format carried by the memory
//    network (one packet = one flit in this model).
//  * The 16-cube Dragonfly: four groups of four cubes, every cube has four
//    ports. Cube c = 4*g + l (group g, local index l). Port k (k != l) links
//    to cube 4*g + k of the same group; port l is the cube's external port:
//    to the host when l == g, otherwise a global link to cube 4*l + g.
//    Minimal routing from (g,l) to (h,m) leaves on port m inside a group and
//    on port h otherwise (this reaches the gateway cube, then the global link).
//  * Double-precision add / multiply (round to nearest even; subnormal inputs
//    and results are flushed to zero), integer operations, and the
//    map / combine / identity functions that define each reduction.
//
// The document gives the field widths of the entries, the operations
// (sum, xor, and, min, max, multiply-accumulate on integer and floating
// point data, and the absolute difference used by its PageRank example) and
// the topology; the encodings, the packet layout and the address-to-cube map
// are this design's own choices.
package ar_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int NCUBES      = 16;   // cubes in the memory network
  localparam int NPORTS      = 4;    // link ports per cube
  localparam int NHOST       = 4;    // host links (one per HMC controller)
  localparam int CUBE_W      = 4;
  localparam int PORT_W      = 2;
  localparam int CUBE_LSB    = 32;   // 4 GB per cube: address bits [35:32] pick the cube
  localparam int OB_ID_W     = 8;    // operand-buffer entry id carried in packets
  localparam int NVC         = 3;    // virtual channels on every link
  localparam int MAX_COUNT   = 8;    // elements per Update (one 64-byte block of 8-byte words)

  // virtual channels: requests, operand responses, gather responses
  localparam int VC_REQ   = 0;
  localparam int VC_ORESP = 1;
  localparam int VC_GRESP = 2;

  // ---------------------------------------------------------------- opcodes
  typedef enum logic [5:0] {
    OP_SUM_I     = 6'd0,   // 64-bit integer sum
    OP_SUM_F     = 6'd1,   // double sum
    OP_XOR       = 6'd2,
    OP_AND       = 6'd3,
    OP_MIN_I     = 6'd4,   // signed
    OP_MAX_I     = 6'd5,
    OP_MIN_F     = 6'd6,
    OP_MAX_F     = 6'd7,
    OP_MAC_I     = 6'd8,   // sum of products, integer
    OP_MAC_F     = 6'd9,   // sum of products, double
    OP_ABSDIFF_F = 6'd10   // sum of |a - b|, double
  } ar_op_e;

  // ---------------------------------------------------------------- packets
  typedef enum logic [2:0] {
    PKT_UPDATE      = 3'd0,
    PKT_GATHER_REQ  = 3'd1,
    PKT_GATHER_RESP = 3'd2,
    PKT_OPND_REQ    = 3'd3,
    PKT_OPND_RESP   = 3'd4
  } pkt_type_e;

  typedef struct packed {
    pkt_type_e          ptype;
    logic [63:0]        flow_id;   // Update / Gather: flow (subflow) identifier
    ar_op_e             opcode;
    logic [63:0]        a;         // Update: src1 address; operand req: address;
                                   // operand resp / gather resp: data
    logic [63:0]        b;         // Update: src2 address or immediate value
    logic               two_opnd;  // Update: operation takes two operands
    logic               imm2;      // Update: b is a value, not an address
    logic [3:0]         count;     // Update: number of elements (1..8)
    logic [CUBE_W-1:0]  dst_cube;  // operand req / resp: destination cube
    logic [CUBE_W-1:0]  src_cube;  // operand req: requesting cube
    logic [OB_ID_W-1:0] buf_id;    // operand req / resp: operand-buffer entry
    logic               sel;       // operand req / resp: 0 = operand1, 1 = operand2
    logic [PORT_W-1:0]  hop_port;  // Update / Gather: link port (out when sent
                                   // by an engine, in when delivered to one)
  } ar_pkt_t;

  // Host-side command assembled by a network interface from its registers.
  typedef struct packed {
    logic               is_gather;
    logic [7:0]         tid;
    ar_op_e             opcode;
    logic [63:0]        src1;
    logic [63:0]        src2;
    logic               two_opnd;
    logic               imm2;
    logic [3:0]         count;
    logic [63:0]        target;
    logic [7:0]         nthreads;
  } ar_cmd_t;

  // one-cycle event pulses of an engine (observability only)
  typedef struct packed {
    logic flow_register;   // a flow was registered in the flow table
    logic update_fwd;      // an Update was forwarded to a child
    logic update_sched;    // an Update element was scheduled here
    logic opnd_req;        // an operand request was sent
    logic ob_stall;        // Update waits: no free operand buffer
    logic ft_stall;        // packet waits: flow table full
    logic alu_op;          // an operation entered the ALU
    logic bypass;          // a reduction used the ALU output register
    logic gather_repl;     // a Gather was replicated to a child
    logic gather_agg;      // a child's partial result was folded in
    logic gather_resp;     // a subtree reported to its parent
  } ar_events_t;

  function automatic int unsigned vc_of(pkt_type_e t);
    case (t)
      PKT_OPND_RESP:   return VC_ORESP;
      PKT_GATHER_RESP: return VC_GRESP;
      default:         return VC_REQ;
    endcase
  endfunction

  // ---------------------------------------------------------------- topology
  function automatic logic [CUBE_W-1:0] addr_cube(logic [63:0] addr);
    return addr[CUBE_LSB +: CUBE_W];
  endfunction

  // output port of cube cur on the minimal route to cube dst (cur != dst)
  function automatic logic [PORT_W-1:0] route_port(logic [CUBE_W-1:0] cur,
                                                   logic [CUBE_W-1:0] dst);
    if (cur[3:2] == dst[3:2]) return dst[1:0];
    else                      return dst[3:2];
  endfunction

  // number of links on the minimal route
  function automatic int unsigned hops(logic [CUBE_W-1:0] src, logic [CUBE_W-1:0] dst);
    int unsigned n;
    if (src == dst) return 0;
    if (src[3:2] == dst[3:2]) return 1;
    n = 1;                                   // global link
    if (src[1:0] != dst[3:2]) n++;           // to the gateway of src's group
    if (dst[1:0] != src[3:2]) n++;           // from the landing cube to dst
    return n;
  endfunction

  // cube that host link r attaches to
  function automatic logic [CUBE_W-1:0] root_cube(logic [1:0] r);
    return {r, r};
  endfunction

  // ---------------------------------------------------------------- doubles
  localparam logic [63:0] FP_QNAN    = 64'h7FF8_0000_0000_0000;
  localparam logic [63:0] FP_POS_INF = 64'h7FF0_0000_0000_0000;
  localparam logic [63:0] FP_NEG_INF = 64'hFFF0_0000_0000_0000;

  function automatic logic fp_is_nan(logic [63:0] x);
    return (x[62:52] == 11'h7FF) && (x[51:0] != 0);
  endfunction

  // round a normalised 56-bit significand (bit 55 = leading one, bits 2..0 =
  // guard, round, sticky) with biased exponent e into a double
  function automatic logic [63:0] fp_pack(logic s, int e, logic [55:0] m);
    logic [53:0] r;
    logic        up;
    up = m[2] & (m[1] | m[0] | m[3]);
    r  = {1'b0, m[55:3]} + 54'(up);
    if (r[53]) begin
      r = r >> 1;
      e = e + 1;
    end
    if (e >= 2047) return {s, 63'h7FF0_0000_0000_0000};
    if (e <= 0)    return {s, 63'd0};
    return {s, 11'(e), r[51:0]};
  endfunction

  function automatic logic [63:0] fp_add(logic [63:0] x, logic [63:0] y);
    logic [63:0] a, b, t;
    logic [55:0] ma, mb, sh;
    logic [56:0] sum;
    int          ea, eb, d, lz;
    logic        sticky;
    if (fp_is_nan(x) || fp_is_nan(y)) return FP_QNAN;
    if (x[62:52] == 11'h7FF) begin
      if (y[62:52] == 11'h7FF && x[63] != y[63]) return FP_QNAN;
      return x;
    end
    if (y[62:52] == 11'h7FF) return y;
    if (x[62:52] == 0 && y[62:52] == 0) return {x[63] & y[63], 63'd0};
    if (x[62:52] == 0) return y;
    if (y[62:52] == 0) return x;
    a = x; b = y;
    if (b[62:0] > a[62:0]) begin t = a; a = b; b = t; end
    ea = int'(a[62:52]); eb = int'(b[62:52]);
    ma = {1'b1, a[51:0], 3'b000};
    mb = {1'b1, b[51:0], 3'b000};
    d  = ea - eb;
    if (d >= 56) begin
      sh = 56'd1;                               // only the sticky bit remains
    end else begin
      sh     = mb >> d;
      sticky = 1'b0;
      for (int i = 0; i < 56; i++) if (i < d && mb[i]) sticky = 1'b1;
      sh[0]  = sh[0] | sticky;
    end
    if (a[63] == b[63]) begin
      sum = {1'b0, ma} + {1'b0, sh};
      if (sum[56]) begin
        sum = {1'b0, sum[56:2], sum[1] | sum[0]};
        ea  = ea + 1;
      end
      return fp_pack(a[63], ea, sum[55:0]);
    end
    sum = {1'b0, ma} - {1'b0, sh};
    if (sum == 0) return 64'd0;
    lz = 0;
    for (int i = 55; i >= 0; i--) begin
      if (sum[i]) break;
      lz++;
    end
    sum = sum << lz;
    return fp_pack(a[63], ea - lz, sum[55:0]);
  endfunction

  function automatic logic [63:0] fp_mul(logic [63:0] x, logic [63:0] y);
    logic         s;
    logic [105:0] p;
    logic [55:0]  m;
    int           e;
    s = x[63] ^ y[63];
    if (fp_is_nan(x) || fp_is_nan(y)) return FP_QNAN;
    if (x[62:52] == 11'h7FF || y[62:52] == 11'h7FF) begin
      if (x[62:52] == 0 || y[62:52] == 0) return FP_QNAN;   // inf * 0
      return {s, 63'h7FF0_0000_0000_0000};
    end
    if (x[62:52] == 0 || y[62:52] == 0) return {s, 63'd0};
    p = {1'b1, x[51:0]} * {1'b1, y[51:0]};
    e = int'(x[62:52]) + int'(y[62:52]) - 1023;
    if (p[105]) begin
      m = {p[105:51], |p[50:0]};
      e = e + 1;
    end else begin
      m = {p[104:50], |p[49:0]};
    end
    return fp_pack(s, e, m);
  endfunction

  // total-order key of a non-NaN double (unsigned compare gives < on reals)
  function automatic logic [63:0] fp_key(logic [63:0] x);
    return x[63] ? ~x : {1'b1, x[62:0]};
  endfunction

  // ---------------------------------------------------------------- reductions
  function automatic logic [63:0] fp_absdiff(logic [63:0] a, logic [63:0] b);
    logic [63:0] d;
    d = fp_add(a, {~b[63], b[62:0]});
    return fp_is_nan(d) ? d : {1'b0, d[62:0]};
  endfunction

  // value an operation contributes, from its one or two operands
  function automatic logic [63:0] ar_map(ar_op_e op, logic [63:0] a, logic [63:0] b);
    case (op)
      OP_MAC_I:     return a * b;
      OP_MAC_F:     return fp_mul(a, b);
      OP_ABSDIFF_F: return fp_absdiff(a, b);
      default:      return a;
    endcase
  endfunction

  // fold a value into a partial result
  function automatic logic [63:0] ar_combine(ar_op_e op, logic [63:0] acc, logic [63:0] v);
    case (op)
      OP_SUM_I, OP_MAC_I:                return acc + v;
      OP_SUM_F, OP_MAC_F, OP_ABSDIFF_F:  return fp_add(acc, v);
      OP_XOR:                            return acc ^ v;
      OP_AND:                            return acc & v;
      OP_MIN_I:  return ($signed(v) < $signed(acc)) ? v : acc;
      OP_MAX_I:  return ($signed(v) > $signed(acc)) ? v : acc;
      OP_MIN_F:  return (fp_key(v) < fp_key(acc)) ? v : acc;
      OP_MAX_F:  return (fp_key(v) > fp_key(acc)) ? v : acc;
      default:   return acc + v;
    endcase
  endfunction

  // neutral start value of a partial result
  function automatic logic [63:0] ar_identity(ar_op_e op);
    case (op)
      OP_AND:   return '1;
      OP_MIN_I: return 64'h7FFF_FFFF_FFFF_FFFF;
      OP_MAX_I: return 64'h8000_0000_0000_0000;
      OP_MIN_F: return FP_POS_INF;
      OP_MAX_F: return FP_NEG_INF;
      default:  return 64'd0;
    endcase
  endfunction

  // the operation reads a second operand
  function automatic logic ar_two_operand(ar_op_e op);
    return op inside {OP_MAC_I, OP_MAC_F, OP_ABSDIFF_F};
  endfunction

endpackage
