// tb_snn_ref_pkg: reference arithmetic and test data for the SNN testbenches.
//
// izh_step repeats the Izhikevich update in plain 64-bit integer arithmetic
// (Q.12, arithmetic shifts), written independently of the PE pipeline.
// tmpl(j,i) is a pseudo-random binary character template: pixel i of
// character j. The weights derived from it are +alpha where the template
// pixel is on and -alpha where it is off, so the template's own character
// collects the largest level-2 current.
package tb_snn_ref_pkg;

  typedef struct {
    longint a, b, c, d;
  } ref_param_t;

  localparam ref_param_t R_EXC = '{a: 82,  b: 819, c: -55*4096, d: 4*4096};
  localparam ref_param_t R_INH = '{a: 246, b: 901, c: -65*4096, d: 2*4096};

  function automatic void izh_step(inout longint v, inout longint u, input longint i,
                                   input ref_param_t p, output bit fire);
    longint sq, t1, dv, vn, du, un;
    sq = (v * v) >>> 12;
    t1 = (sq * 164) >>> 12;
    dv = t1 + 5 * v + 140 * 4096 - u + i;
    vn = v + (dv >>> 1);
    du = (p.a * (((p.b * v) >>> 12) - u)) >>> 12;
    un = u + du;
    fire = (vn >= 30 * 4096);
    if (fire) begin
      vn = p.c;
      un = un + p.d;
    end
    v = vn;
    u = un;
  endfunction

  function automatic bit tmpl(int j, int i);
    int unsigned h;
    h = i * 32'h9E3779B1 ^ (j + 1) * 32'h85EBCA77;
    h ^= h >> 15;
    h *= 32'hC2B2AE3D;
    h ^= h >> 13;
    return h[7];
  endfunction

  function automatic longint weight(int i, int j, int alpha);
    return tmpl(j, i) ? alpha : -alpha;
  endfunction

  // 64-bit SRAM word at address addr (n2 level-2 neurons)
  function automatic logic [63:0] sram_word(int addr, int n2, int alpha);
    int wpi, i, k;
    logic [63:0] w;
    wpi = n2 / 4;
    i = addr / wpi;
    k = addr % wpi;
    for (int q = 0; q < 4; q++) w[q*16 +: 16] = 16'(weight(i, 4 * k + q, alpha));
    return w;
  endfunction

endpackage
