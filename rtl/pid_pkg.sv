// pid_pkg: shared constants, types and the partial-product function of the
// distributed-arithmetic (DA) PID controller.
//
// Number formats. Error samples e(n) and controller outputs m(n) are B-bit
// two's-complement fractions (one sign bit, B-1 fraction bits, range [-1,1)),
// as the controller's derivation assumes. The look-up table words are ROM_W
// bits with ROM_FRAC fraction bits; with ROM_FRAC = ROM_W-2 the table can hold
// partial products up to +/-2, which the sum a0+1 needs. The fraction split of
// the table is a choice of this design; the 16-bit table width and the table
// contents follow the controller description.
//
// The controller law is m(n) = a0*e(n) + a1*e(n-1) + a2*e(n-2) + m(n-1): a
// PID written as an IIR whose feedback coefficient is exactly 1. The default
// configuration has Kd = 0, hence a2 = 0, and drops the e(n-2) operand.
package pid_pkg;

  // Default word sizes.
  localparam int unsigned PID_DATA_W   = 16;  // B: width of e(n) and m(n)
  localparam int unsigned PID_ROM_W    = 16;  // width of one partial-product word
  localparam int unsigned PID_ROM_FRAC = 14;  // fraction bits of a table word

  // Default coefficients in table format (value * 2^ROM_FRAC, rounded):
  // a0 = 0.7502 -> 12291, a1 = -0.7498 -> -12285.
  localparam int PID_A0_Q = 12291;
  localparam int PID_A1_Q = -12285;
  localparam int PID_A2_Q = 0;

  // Table address with the optional e(n-2) operand included:
  // {e_k(n), e_k(n-1), e_k(n-2), m_k(n-1)}. Without e(n-2) the table uses the
  // three-bit address {e_k(n), e_k(n-1), m_k(n-1)}.
  typedef logic [3:0] rom_addr_t;

  // Steps of the control unit within one sample period.
  typedef enum logic [1:0] {
    ST_LOAD  = 2'd0,  // lr: result to output buffer, new sample to the PISOs
    ST_CLEAR = 2'd1,  // clacc: clear accumulator, sc: start next conversion
    ST_ACC   = 2'd2,  // add partial product and halve, bits k = B-1 .. 1
    ST_SUB   = 2'd3   // subtract partial product of the sign bits (k = 0)
  } cu_state_t;

  // Partial product F for one address: the sum of the coefficients whose
  // input bit is set. The coefficient of m(n-1) is exactly one.
  function automatic int partial_product(input rom_addr_t addr, input int a0_q,
                                         input int a1_q, input int a2_q,
                                         input int unsigned frac);
    int f;
    f = 0;
    if (addr[3]) f += a0_q;
    if (addr[2]) f += a1_q;
    if (addr[1]) f += a2_q;
    if (addr[0]) f += (1 <<< frac);
    return f;
  endfunction

endpackage
