// tb_edac_ref_pkg -- reference models used by the EDAC testbenches.
//
// They are written independently of the RTL: the Hsiao check bits come from
// a table of the three rows (1..8) holding a one in each data column, and
// the CRC remainder from a long division of the 24-bit dividend d * x^8 by
// the 9-bit generator 1_0000_0111 (x^8 + x^2 + x + 1), done bit by bit on
// the dividend rather than with a shift register.
package tb_edac_ref_pkg;

  typedef int unsigned triple_t [3];

  // Rows (1-based) with a one in Hsiao data column j.
  localparam int unsigned HROWS [16][3] = '{
    '{1,2,3}, '{1,2,4}, '{1,2,5}, '{1,2,6}, '{1,2,7}, '{1,2,8},
    '{3,4,5}, '{3,4,6}, '{3,4,7}, '{3,4,8}, '{3,5,6}, '{4,7,8},
    '{5,6,7}, '{5,6,8}, '{5,7,8}, '{6,7,8}
  };

  function automatic logic [7:0] ref_hsiao(input logic [15:0] d);
    logic [7:0] c;
    c = '0;
    for (int j = 0; j < 16; j++)
      for (int k = 0; k < 3; k++)
        if (d[j]) c[HROWS[j][k]-1] = ~c[HROWS[j][k]-1];
    return c;
  endfunction

  function automatic logic [7:0] ref_crc(input logic [15:0] d);
    logic [23:0] rem;
    rem = {d, 8'h00};
    for (int i = 23; i >= 8; i--)
      if (rem[i]) rem[i -: 9] = rem[i -: 9] ^ 9'b1_0000_0111;
    return rem[7:0];
  endfunction

  // code 0: Hsiao, 1: CRC
  function automatic logic [7:0] ref_half(input logic [15:0] d, input bit code);
    return code ? ref_crc(d) : ref_hsiao(d);
  endfunction

  function automatic logic [15:0] ref_check(input logic [31:0] m,
                                            input bit even_code,
                                            input bit odd_code);
    logic [15:0] ev, od;
    logic [7:0]  ce, co;
    logic [15:0] c;
    for (int i = 0; i < 16; i++) begin
      ev[i] = m[2*i];
      od[i] = m[2*i+1];
    end
    ce = ref_half(ev, even_code);
    co = ref_half(od, odd_code);
    for (int i = 0; i < 8; i++) begin
      c[2*i]   = ce[i];
      c[2*i+1] = co[i];
    end
    return c;
  endfunction

endpackage
