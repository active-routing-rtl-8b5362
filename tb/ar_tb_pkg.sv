// ar_tb_pkg: reference models shared by the Active-Routing testbenches.
// Everything here is computed independently of the RTL: floating point with
// the simulator's real arithmetic, integers with plain SystemVerilog
// operators. mem_value() defines the contents of memory seen by the vault
// model: a small integer-valued double derived from the address, so that
// sums and products are exact whatever the order of reduction.
package ar_tb_pkg;
  import ar_pkg::*;

  function automatic logic [63:0] mem_value(logic [63:0] addr);
    int v;
    v = int'((addr[34:3] * 7 + addr[35:32] * 13) % 201) - 100;
    return $realtobits(real'(v));
  endfunction

  function automatic real r(logic [63:0] x);
    return $bitstoreal(x);
  endfunction

  // reference: map then combine
  function automatic logic [63:0] ref_map(ar_op_e op, logic [63:0] a, logic [63:0] b);
    real p;
    case (op)
      OP_MAC_I:     return a * b;
      OP_MAC_F:     begin p = r(a) * r(b); return $realtobits(p); end
      OP_ABSDIFF_F: begin p = r(a) - r(b); if (p < 0.0) p = -p; return $realtobits(p); end
      default:      return a;
    endcase
  endfunction

  function automatic logic [63:0] ref_combine(ar_op_e op, logic [63:0] acc, logic [63:0] v);
    real s;
    case (op)
      OP_SUM_I, OP_MAC_I: return acc + v;
      OP_SUM_F, OP_MAC_F, OP_ABSDIFF_F: begin s = r(acc) + r(v); return $realtobits(s); end
      OP_XOR:   return acc ^ v;
      OP_AND:   return acc & v;
      OP_MIN_I: return ($signed(acc) < $signed(v)) ? acc : v;
      OP_MAX_I: return ($signed(acc) > $signed(v)) ? acc : v;
      OP_MIN_F: return (r(acc) < r(v)) ? acc : v;
      OP_MAX_F: return (r(acc) > r(v)) ? acc : v;
      default:  return acc + v;
    endcase
  endfunction

  function automatic logic [63:0] ref_identity(ar_op_e op);
    case (op)
      OP_AND:   return 64'hFFFF_FFFF_FFFF_FFFF;
      OP_MIN_I: return 64'h7FFF_FFFF_FFFF_FFFF;
      OP_MAX_I: return 64'h8000_0000_0000_0000;
      OP_MIN_F: return 64'h7FF0_0000_0000_0000;
      OP_MAX_F: return 64'hFFF0_0000_0000_0000;
      default:  return 64'd0;
    endcase
  endfunction

  // random normal double with exponent in [1023-range, 1023+range]
  function automatic logic [63:0] rand_double(int range);
    logic [63:0] x;
    int e;
    e = 1023 - range + int'($urandom_range(2 * range));
    x = {$urandom(), $urandom()};
    x[62:52] = 11'(e);
    return x;
  endfunction
endpackage
