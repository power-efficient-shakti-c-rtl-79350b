// tb_mac_ref_pkg: reference arithmetic for the MAC testbenches.
//
// ref_smul multiplies two signed W-bit numbers (W <= 64) by shift-and-add on
// their magnitudes and applies the sign afterwards, so it does not share the
// '*' operator the multiplier under test is written with. The result is the
// 128-bit two's-complement product.
package tb_mac_ref_pkg;
  function automatic logic [127:0] ref_smul(input logic [63:0] a,
                                            input logic [63:0] b,
                                            input int unsigned w);
    logic [127:0] ma, mb, acc;
    logic         na, nb;
    // sign-extend the w-bit operands to 128 bits
    ma = 128'(a);
    mb = 128'(b);
    if (w < 64) begin
      ma = ma & ((128'd1 << w) - 1);
      mb = mb & ((128'd1 << w) - 1);
    end
    na = ma[w-1];
    nb = mb[w-1];
    if (na) ma = (128'd1 << w) - ma;   // magnitude
    if (nb) mb = (128'd1 << w) - mb;
    acc = '0;
    for (int i = 0; i < 64; i++)
      if (mb[i]) acc = acc + (ma << i);
    if (na ^ nb) acc = ~acc + 128'd1;
    return acc;
  endfunction
endpackage
