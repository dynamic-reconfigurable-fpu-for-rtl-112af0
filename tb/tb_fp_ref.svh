// Reference arithmetic shared by the testbenches: conversion between the
// five formats and SystemVerilog real (IEEE double), written directly from
// the format definitions (sign, biased exponent, fraction; round to nearest,
// ties to even; overflow to infinity; gradual underflow).
`ifndef TB_FP_REF_SVH
`define TB_FP_REF_SVH

function automatic int ref_eb(int f);
  case (f) 0: return 11; 1: return 8; 2: return 5; 3: return 8; default: return 6; endcase
endfunction
function automatic int ref_fb(int f);
  case (f) 0: return 52; 1: return 23; 2: return 10; 3: return 7; default: return 9; endcase
endfunction
function automatic int ref_nl(int f);
  return (f == 0) ? 1 : (f == 1) ? 2 : 4;
endfunction

function automatic real ref_pow2(int n);
  real r;
  r = 1.0;
  if (n >= 0) repeat (n) r = r * 2.0;
  else repeat (-n) r = r * 0.5;
  return r;
endfunction

// lane bits (right aligned) -> real; NaN maps to a real NaN, inf to a huge value
function automatic real ref_to_real(logic [63:0] x, int f);
  int eb, fb, bias, e;
  logic s;
  logic [63:0] m;
  real r;
  eb = ref_eb(f);
  fb = ref_fb(f);
  bias = (1 << (eb - 1)) - 1;
  s = x[eb + fb];
  e = int'((x >> fb) & ((64'd1 << eb) - 1));
  m = x & ((64'd1 << fb) - 1);
  if (f == 0) return $bitstoreal(x);
  if (e == (1 << eb) - 1) begin
    if (m != 0) return $bitstoreal(64'h7FF8000000000000);
    return s ? $bitstoreal(64'hFFF0000000000000) : $bitstoreal(64'h7FF0000000000000);
  end
  if (e == 0) r = real'(m) * ref_pow2(1 - bias - fb);
  else r = real'(m | (64'd1 << fb)) * ref_pow2(e - bias - fb);
  return s ? -r : r;
endfunction

// real -> lane bits of format f, round to nearest even
function automatic logic [63:0] ref_from_real(real r, int f);
  logic [63:0] d, m, mant, rem, half;
  int eb, fb, bias, e, et, sh;
  logic s;
  eb = ref_eb(f);
  fb = ref_fb(f);
  bias = (1 << (eb - 1)) - 1;
  d = $realtobits(r);
  if (f == 0) return d;
  s = d[63];
  e = int'(d[62:52]);
  if (e == 2047) begin
    if (d[51:0] != 0) return (((64'd1 << eb) - 1) << fb) | (64'd1 << (fb - 1));
    return (64'(s) << (eb + fb)) | (((64'd1 << eb) - 1) << fb);
  end
  if (e == 0) return 64'(s) << (eb + fb);  // double subnormals do not occur here
  m  = {11'd1, d[51:0]};
  et = e - 1023 + bias;
  sh = 52 - fb;
  if (et < 1) begin
    sh = sh + (1 - et);
    et = 0;
  end
  if (sh > 60) begin
    mant = 0;
    rem  = 1;
    half = 64'd1 << 62;
  end else begin
    mant = m >> sh;
    rem  = m & ((64'd1 << sh) - 1);
    half = 64'd1 << (sh - 1);
  end
  if (rem > half || (rem == half && mant[0])) mant = mant + 1;
  if (et == 0) begin
    if (mant[fb]) et = 1;
  end else if (mant[fb+1]) begin
    mant = mant >> 1;
    et = et + 1;
  end
  if (et >= (1 << eb) - 1) return (64'(s) << (eb + fb)) | (((64'd1 << eb) - 1) << fb);
  return (64'(s) << (eb + fb)) | (64'(et) << fb) | (mant & ((64'd1 << fb) - 1));
endfunction

function automatic logic ref_is_nan(logic [63:0] x, int f);
  int eb, fb;
  eb = ref_eb(f);
  fb = ref_fb(f);
  return (((x >> fb) & ((64'd1 << eb) - 1)) == ((64'd1 << eb) - 1)) && ((x & ((64'd1 << fb) - 1)) != 0);
endfunction

// random lane value: exponent bias+lo..bias+hi, keep the top 'mbits' fraction bits
function automatic logic [63:0] ref_rand_lane(int f, int lo, int hi, int mbits);
  int eb, fb, bias, e;
  logic [63:0] m;
  eb = ref_eb(f);
  fb = ref_fb(f);
  bias = (1 << (eb - 1)) - 1;
  e = bias + lo + int'($urandom_range(0, hi - lo));
  m = {$urandom, $urandom} & ((64'd1 << fb) - 1);
  if (mbits < fb) m = m & ~((64'd1 << (fb - mbits)) - 1);
  return (64'($urandom_range(0, 1)) << (eb + fb)) | (64'(e) << fb) | m;
endfunction

`endif
