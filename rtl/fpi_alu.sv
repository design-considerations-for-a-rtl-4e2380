// fpi_alu: one floating point / integer / logical ALU lane (32 bits).
//
// The evaluation unit has two of these.  A scalar uses lane 0; a vector
// slice of two 32-bit elements uses both lanes at once, which is how the
// evaluation unit doubles its vector rate.  The lane is purely
// combinational; the evaluation unit allows one 200 ns machine cycle for it.
//
// Integer operations are 32-bit two's complement.  Real operations use the
// IEEE single format in a simplified form chosen for this design: results
// are truncated (round toward zero), zero or denormal inputs count as zero,
// underflow gives zero and overflow gives infinity; NaN is not produced or
// recognised.  Comparisons return 1 or 0 with is_bool set.
module fpi_alu
  import dfm_pkg::*;
(
  input  logic [FUNC_W-1:0] func,
  input  logic              is_real,
  input  logic [31:0]       a,
  input  logic [31:0]       b,
  output logic [31:0]       y,
  output logic              is_bool,
  output logic              ok       // function defined for this lane
);
  // ------------------------------------------------------------ reals
  function automatic logic [31:0] f_mul(input logic [31:0] x, input logic [31:0] z);
    logic        s;
    logic [47:0] m;
    logic [9:0]  e;
    s = x[31] ^ z[31];
    if (x[30:23] == 0 || z[30:23] == 0) return {s, 31'b0};
    m = {1'b1, x[22:0]} * {1'b1, z[22:0]};
    e = {2'b0, x[30:23]} + {2'b0, z[30:23]} - 10'd127 + {9'b0, m[47]};
    if ($signed(e) <= 0)  return {s, 31'b0};
    if ($signed(e) >= 255) return {s, 8'hFF, 23'b0};
    return {s, e[7:0], m[47] ? m[46:24] : m[45:23]};
  endfunction

  function automatic logic [31:0] f_add(input logic [31:0] x0, input logic [31:0] z0);
    logic [31:0] x, z;
    logic [7:0]  d;
    logic [31:0] mx, mz, r;
    logic [9:0]  e;
    int          lz;
    // order by magnitude
    if (z0[30:0] > x0[30:0]) begin x = z0; z = x0; end else begin x = x0; z = z0; end
    if (z[30:23] == 0) return (x[30:23] == 0) ? 32'b0 : x;
    d  = x[30:23] - z[30:23];
    mx = {1'b0, 1'b1, x[22:0], 7'b0};
    mz = (d > 30) ? 32'b0 : ({1'b0, 1'b1, z[22:0], 7'b0} >> d);
    e  = {2'b0, x[30:23]};
    if (x[31] == z[31]) begin
      r = mx + mz;
      if (r[31]) begin r = r >> 1; e = e + 1; end
      if (e >= 255) return {x[31], 8'hFF, 23'b0};
      return {x[31], e[7:0], r[29:7]};
    end
    r = mx - mz;
    if (r == 0) return 32'b0;
    lz = 0;
    for (int i = 30; i >= 0; i--) begin
      if (r[i]) break;
      lz++;
    end
    r = r << lz;
    if (int'(e) - lz <= 0) return {x[31], 31'b0};
    e = e - 10'(lz);
    return {x[31], e[7:0], r[29:7]};
  endfunction

  function automatic logic f_lt(input logic [31:0] x, input logic [31:0] z);
    logic xz, zz;
    xz = (x[30:23] == 0);
    zz = (z[30:23] == 0);
    if (xz && zz) return 1'b0;
    if (xz) return !z[31];
    if (zz) return x[31];
    if (x[31] != z[31]) return x[31];
    return x[31] ? (x[30:0] > z[30:0]) : (x[30:0] < z[30:0]);
  endfunction

  function automatic logic [31:0] i_to_r(input logic [31:0] x);
    logic [31:0] m;
    int          lz;
    if (x == 0) return 32'b0;
    m  = x[31] ? -x : x;
    lz = 0;
    for (int i = 31; i >= 0; i--) begin
      if (m[i]) break;
      lz++;
    end
    m = m << lz;
    return {x[31], 8'(127 + 31 - lz), m[30:8]};
  endfunction

  function automatic logic [31:0] r_to_i(input logic [31:0] x);
    logic [55:0] m;
    int          sh;
    if (x[30:23] < 127) return 32'b0;
    if (x[30:23] > 157) return x[31] ? 32'h8000_0000 : 32'h7FFF_FFFF;
    sh = int'(x[30:23]) - 127;
    m  = {32'b0, 1'b1, x[22:0]} << sh;
    return x[31] ? -m[54:23] : m[54:23];
  endfunction

  always_comb begin
    y       = '0;
    is_bool = 1'b0;
    ok      = 1'b1;
    unique case (func)
      F_ID:   y = a;
      F_ADD:  y = is_real ? f_add(a, b) : a + b;
      F_SUB:  y = is_real ? f_add(a, {~b[31], b[30:0]}) : a - b;
      F_MUL:  y = is_real ? f_mul(a, b) : a * b;
      F_AND:  y = a & b;
      F_OR:   y = a | b;
      F_XOR:  y = a ^ b;
      F_NEG:  y = is_real ? {~a[31], a[30:0]} : -a;
      F_LT: begin
        is_bool = 1'b1;
        y = {31'b0, is_real ? f_lt(a, b) : ($signed(a) < $signed(b))};
      end
      F_EQ: begin
        is_bool = 1'b1;
        y = {31'b0, (a == b)};
      end
      F_ITOR: y = i_to_r(a);
      F_RTOI: y = r_to_i(a);
      default: ok = 1'b0;
    endcase
  end
endmodule
