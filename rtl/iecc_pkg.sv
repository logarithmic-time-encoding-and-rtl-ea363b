// iecc_pkg: shared constants of the integer error control code (IECC) datapath.
//
// An IECC protects k data bytes B_1..B_k of b bits with one check byte
// B_{k+1} = sum C_i*B_i mod 2^b-1. The defaults below describe the
// (2048,1984) code with b = 64, k = 31 and single-bit errors per byte
// (t = 1), whose syndrome table holds 2*b*(k+1) = 4096 entries. The cycle
// counts N_IM (one modular multiplication) and N_ST (one syndrome-table
// access, L1-cache class) are the figures the throughput model of the code
// is built on; N_IA = 1 clock per modular addition is fixed by the adder
// tree, which registers every stage.
package iecc_pkg;
  parameter int unsigned B_DEF     = 64;   // byte width b
  parameter int unsigned K_DEF     = 31;   // data bytes per codeword k
  parameter int unsigned T_DEF     = 1;    // corrected bytes per error pattern t
  parameter int unsigned N_IM_DEF  = 3;    // clocks per modular multiplication
  parameter int unsigned N_ST_DEF  = 4;    // clocks per syndrome-table read
  parameter int unsigned DEPTH_DEF = 2 * B_DEF * (K_DEF + 1); // |xi| for t = 1

  // Width of one error-location field: ceil(log2(k+1)) bits (locations are
  // stored 0-based, byte i as i-1).
  function automatic int unsigned loc_width(input int unsigned k);
    return (k + 1 <= 1) ? 1 : $clog2(k + 1);
  endfunction

  // Width of one syndrome-table entry: S, then t pairs (location, value).
  function automatic int unsigned entry_width(input int unsigned b,
                                              input int unsigned k,
                                              input int unsigned t);
    return b + t * (loc_width(k) + b);
  endfunction
endpackage
