// tb_rc_pkg: reference functions shared by the testbenches of the
// reconfigurable cache: LUT contents for 2-bit adders, 4x8 constant
// multipliers and DCT ROMs, the packing of LUT entries into cache words, and
// bit-exact and floating-point models of the DCT datapath.
//
// LUT contents are what a host would compute in software; they are derived
// here from their definitions (a + b, c * x, sums of cosine weights), not
// from the RTL.
package tb_rc_pkg;

  localparam real PI = 3.14159265358979323846;

  // 12-bit multi-context 2-bit adder entry for LUT address {b[1:0], a[1:0]}:
  // [5:0] add context, [11:6] subtract context (a + ~b); each context holds
  // {carry, sum} for carry-in 0 in [2:0] and for carry-in 1 in [5:3].
  function automatic logic [15:0] adder_entry(input int unsigned addr);
    int unsigned a, b, nb;
    logic [15:0] e;
    a  = addr & 3;
    b  = (addr >> 2) & 3;
    nb = (~b) & 3;
    e  = '0;
    e[2:0]   = 3'(a + b);
    e[5:3]   = 3'(a + b + 1);
    e[8:6]   = 3'(a + nb);
    e[11:9]  = 3'(a + nb + 1);
    return e;
  endfunction

  // 4x8 constant-coefficient multiplier: 12-bit product c * x; part = 0
  // gives the low six bits, part = 1 the high six bits.
  function automatic logic [15:0] mult_entry(input int unsigned c, input int unsigned x,
                                             input int unsigned part);
    int unsigned p;
    p = (c * x) & 32'hfff;
    return 16'(part == 0 ? (p & 32'h3f) : (p >> 6));
  endfunction

  // Distributed-arithmetic ROM: sum of the weights whose address bit is set.
  function automatic logic [15:0] rom_entry(input int w0, input int w1, input int w2,
                                            input int w3, input int unsigned addr);
    int s;
    s = 0;
    if (addr[0]) s += w0;
    if (addr[1]) s += w1;
    if (addr[2]) s += w2;
    if (addr[3]) s += w3;
    return 16'(s);
  endfunction

  // Cache word w (0..7) of a block whose 8 LUTs hold entries e0..e7:
  // word bit 2k+p = entry k bit 2w+p.
  function automatic logic [15:0] pack_word(input logic [15:0] e [8], input int unsigned w);
    logic [15:0] r;
    for (int k = 0; k < 8; k++) begin
      r[2*k]   = e[k][2*w];
      r[2*k+1] = e[k][2*w+1];
    end
    return r;
  endfunction

  // Cosine weight of the 8-point transform, scaled by 2^13:
  // 0.5 * C(u) * cos((2i+1) u pi / 16), C(0) = 1/sqrt(2).
  function automatic int dct_weight(input int u, input int i);
    real cu, v;
    cu = (u == 0) ? 1.0 / $sqrt(2.0) : 1.0;
    v  = 0.5 * cu * $cos((2.0 * i + 1.0) * u * PI / 16.0) * 8192.0;
    return int'(v);  // real to int conversion rounds to nearest
  endfunction

  // Weights of PE p (0..7). Forward DCT: PE j<4 computes X(2j) from s_0..s_3,
  // PE 4+j computes X(2j+1) from d_0..d_3. Inverse: PE k<4 computes E_k from
  // X0,X2,X4,X6, PE 4+k computes O_k from X1,X3,X5,X7.
  function automatic int pe_weight(input bit inverse, input int p, input int i);
    int j;
    j = p % 4;
    if (!inverse) return dct_weight((p < 4) ? 2*j : 2*j+1, i);
    else          return dct_weight((p < 4) ? 2*i : 2*i+1, j);
  endfunction

  // Bit-serial distributed-arithmetic inner product as in the shift-
  // accumulator: B-bit inputs v0..v3, LSB first, sign bit subtracted.
  function automatic logic [15:0] da_model(input int w [4], input int v [4], input int B);
    logic [15:0] acc, p;
    int unsigned addr;
    acc = '0;
    for (int k = 0; k < B; k++) begin
      addr = 0;
      for (int i = 0; i < 4; i++) if (((v[i] >> k) & 1) != 0) addr |= (1 << i);
      p   = rom_entry(w[0], w[1], w[2], w[3], addr);
      acc = (k == 0) ? 16'd0 : 16'($signed(acc) >>> 1);
      acc = (k == B - 1) ? acc - p : acc + p;
    end
    return acc;
  endfunction

  // Bit-exact model of one row through the 1-D unit (WD-bit inputs).
  function automatic void row_model(input bit inverse, input int x [8], input int WD,
                                    output int y [8]);
    int v [8];
    int w [4], vv [4];
    logic [15:0] acc [8];
    logic [15:0] s;
    for (int i = 0; i < 4; i++) begin
      if (!inverse) begin
        v[i]   = x[i] + x[7-i];
        v[4+i] = x[i] - x[7-i];
      end else begin
        v[i]   = x[2*i];
        v[4+i] = x[2*i+1];
      end
    end
    for (int p = 0; p < 8; p++) begin
      for (int i = 0; i < 4; i++) begin
        w[i]  = pe_weight(inverse, p, i);
        vv[i] = v[(p < 4 ? 0 : 4) + i];
      end
      acc[p] = da_model(w, vv, WD + 1);
    end
    for (int i = 0; i < 4; i++) begin
      if (!inverse) begin
        y[2*i]   = int'($signed(acc[i]));
        y[2*i+1] = int'($signed(acc[4+i]));
      end else begin
        s        = acc[i] + acc[4+i];
        y[i]     = int'($signed(s));
        s        = acc[i] - acc[4+i];
        y[7-i]   = int'($signed(s));
      end
    end
  endfunction

  // Floating-point 1-D transform with the same normalisation
  // (0.5 * C(u) per dimension).
  function automatic real dct1d_real(input bit inverse, input int x [8], input int k);
    real s, cu;
    s = 0.0;
    for (int n = 0; n < 8; n++) begin
      if (!inverse) begin
        cu = (k == 0) ? 1.0 / $sqrt(2.0) : 1.0;
        s += 0.5 * cu * x[n] * $cos((2.0 * n + 1.0) * k * PI / 16.0);
      end else begin
        cu = (n == 0) ? 1.0 / $sqrt(2.0) : 1.0;
        s += 0.5 * cu * x[n] * $cos((2.0 * k + 1.0) * n * PI / 16.0);
      end
    end
    return s;
  endfunction

endpackage
