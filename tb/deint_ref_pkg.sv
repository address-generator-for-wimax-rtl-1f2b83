// deint_ref_pkg: reference model of the IEEE 802.16e channel interleaver
// permutations, written with the standard's floor-based formulas so that
// testbenches can check the floor-free generators against them.
//   Interleaver, bit k of a block of N bits, d = 16, s = max(bits/2, 1):
//     m = (N/d)*(k mod d) + floor(k/d)
//     t = s*floor(m/s) + (m + N - floor(d*m/N)) mod s      (position sent)
//   Deinterleaver, received position n:
//     m = s*floor(n/s) + (n + floor(d*n/N)) mod s
//     k = d*m - (N-1)*floor(d*m/N)                          (original index)
package deint_ref_pkg;

  localparam int REF_D = 16;

  // s parameter of a modulation code (0 QPSK, 1 16-QAM, 2 64-QAM).
  function automatic int ref_s(input int mod_code);
    case (mod_code)
      1:       return 2;
      2:       return 3;
      default: return 1;
    endcase
  endfunction

  // Original index of the bit received at position n.
  function automatic int deint_addr(input int n, input int ncbps, input int s);
    int m;
    m = s * (n / s) + (n + (REF_D * n) / ncbps) % s;
    return REF_D * m - (ncbps - 1) * ((REF_D * m) / ncbps);
  endfunction

  // Position at which original bit k is transmitted.
  function automatic int intl_pos(input int k, input int ncbps, input int s);
    int m;
    m = (ncbps / REF_D) * (k % REF_D) + k / REF_D;
    return s * (m / s) + (m + ncbps - (REF_D * m) / ncbps) % s;
  endfunction

  // Block sizes selected by the crate code of each modulation.
  function automatic int ref_ncbps(input int mod_code, input int crate);
    int qpsk[8]  = '{96, 144, 192, 288, 384, 432, 480, 576};
    int qam16[4] = '{192, 288, 384, 576};
    int qam64[4] = '{144, 288, 432, 576};
    case (mod_code)
      1:       return qam16[crate % 4];
      2:       return qam64[crate % 4];
      default: return qpsk[crate % 8];
    endcase
  endfunction

endpackage
