// conv_prog_pkg: generates the convolution test program for the PIM system.
//
// gen_conv() emits machine code for an unoptimised (locals-in-memory style)
// convolution of an H x W x D image of 32-bit words with a K x K x D kernel
// into an (H-K+1) x (W-K+1) output, stride 1, no padding:
//   out[oy][ox] = sum_{d,ky,kx} img[d][oy+ky][ox+kx] * ker[d][ky][kx]
// Each multiply-accumulate copies the pixel and weight into two stack locals
// and then combines locals, as in the code of a non-optimising compiler.
// With pim = 1 the combining steps use PIM instructions:
//   mul.p x15, -32(x8), -56(x8) ; sw x15, -40(x9)
//   add.p x15, -88(x9), -40(x9) ; sw x15, -88(x9)
// the inner loop counter kept at -20(x8) is stepped with addi.p, and the
// output index kept at -24(x8) is scaled with slli.p.  With pim = 0 the same
// steps use lw/lw/mul/sw, lw/lw/add/sw, lw/addi/sw and lw/slli.
// Memory layout (byte addresses): locals around FRAME, kernel at KER_BASE,
// image at IMG_BASE, output right after the image.  The program ends with a
// store to DONE_ADDR (peripheral range).
package conv_prog_pkg;
  import rv_asm_pkg::*;

  localparam int FRAME     = 32'h200;
  localparam int KER_BASE  = 32'h400;
  localparam int IMG_BASE  = 32'h1000;
  localparam int DONE_ADDR = 32'h8000_0010;

  function automatic int out_base(int H, int W, int D);
    return IMG_BASE + H * W * D * 4;
  endfunction

  // load a 32-bit constant
  function automatic void li(ref logic [31:0] q[$], input int rd, input int v);
    int lo = (v << 20) >>> 20;          // sign-extended low 12 bits
    int hi = (v - lo) >>> 12;
    q.push_back(lui(rd, 20'(hi)));
    q.push_back(addi(rd, rd, lo));
  endfunction

  function automatic void gen_conv(ref logic [31:0] q[$], input bit pim,
                                   input int H, input int W, input int D, input int K);
    int Ho = H - K + 1, Wo = W - K + 1;
    int l_oy, l_ox, l_d, l_ky, l_kx;
    q.delete();
    li(q, 8, FRAME);  li(q, 9, FRAME);           // x8, x9 frame pointers
    li(q, 21, DONE_ADDR);
    li(q, 13, IMG_BASE);                         // a3 window origin
    li(q, 12, out_base(H, W, D));                // a2 output base
    li(q, 18, (H - K) * W * 4);                  // s2 plane skip
    li(q, 19, KER_BASE);                         // s3 kernel base
    q.push_back(addi(7, 0, K));                  // t2 = K
    q.push_back(sw(0, -24, 8));                  // output index = 0
    li(q, 28, Ho);                               // t3 rows
    l_oy = q.size();
    li(q, 29, Wo);                               // t4 columns
    l_ox = q.size();
    q.push_back(sw(0, -88, 9));                  // acc = 0
    q.push_back(addi(10, 13, 0));                // a0 = window origin
    q.push_back(addi(11, 19, 0));                // a1 = kernel base
    q.push_back(addi(30, 0, D));                 // t5 planes
    l_d = q.size();
    q.push_back(addi(31, 7, 0));                 // t6 = K rows
    l_ky = q.size();
    q.push_back(sw(0, -20, 8));                  // kx = 0
    l_kx = q.size();
    q.push_back(lw(14, 0, 10));  q.push_back(sw(14, -56, 8));    // pixel -> local
    q.push_back(lw(14, 0, 11));  q.push_back(sw(14, -32, 8));    // weight -> local
    if (pim) begin
      q.push_back(mul_p(15, -32, -56, 8));
      q.push_back(sw(15, -40, 9));
      q.push_back(add_p(15, -88, -40, 9));
      q.push_back(sw(15, -88, 9));
      q.push_back(addi(10, 10, 4));
      q.push_back(addi(11, 11, 4));
      q.push_back(addi_p(15, -20, 8, 1));
      q.push_back(sw(15, -20, 8));
    end else begin
      q.push_back(lw(14, -32, 8)); q.push_back(lw(15, -56, 8));
      q.push_back(mul(15, 14, 15)); q.push_back(sw(15, -40, 9));
      q.push_back(lw(14, -88, 9)); q.push_back(lw(15, -40, 9));
      q.push_back(add(15, 14, 15)); q.push_back(sw(15, -88, 9));
      q.push_back(addi(10, 10, 4));
      q.push_back(addi(11, 11, 4));
      q.push_back(lw(15, -20, 8)); q.push_back(addi(15, 15, 1));
      q.push_back(sw(15, -20, 8));
    end
    q.push_back(bne(15, 7, (l_kx - q.size()) * 4));
    q.push_back(addi(10, 10, (W - K) * 4));      // next image row
    q.push_back(addi(31, 31, -1));
    q.push_back(bne(31, 0, (l_ky - q.size()) * 4));
    q.push_back(add(10, 10, 18));                // next plane
    q.push_back(addi(30, 30, -1));
    q.push_back(bne(30, 0, (l_d - q.size()) * 4));
    // out[idx] = acc ; idx++
    if (pim) begin
      q.push_back(slli_p(15, -24, 8, 2));
      q.push_back(add(15, 15, 12));
      q.push_back(lw(14, -88, 9));
      q.push_back(sw(14, 0, 15));
      q.push_back(addi_p(15, -24, 8, 1));
      q.push_back(sw(15, -24, 8));
    end else begin
      q.push_back(lw(15, -24, 8));
      q.push_back(slli(15, 15, 2));
      q.push_back(add(15, 15, 12));
      q.push_back(lw(14, -88, 9));
      q.push_back(sw(14, 0, 15));
      q.push_back(lw(15, -24, 8));
      q.push_back(addi(15, 15, 1));
      q.push_back(sw(15, -24, 8));
    end
    q.push_back(addi(13, 13, 4));                // next window
    q.push_back(addi(29, 29, -1));
    q.push_back(bne(29, 0, (l_ox - q.size()) * 4));
    q.push_back(addi(13, 13, (K - 1) * 4));      // next output row
    q.push_back(addi(28, 28, -1));
    q.push_back(bne(28, 0, (l_oy - q.size()) * 4));
    q.push_back(sw(0, 0, 21));                   // done
    for (int i = 0; i < 8; i++) q.push_back(nop());
  endfunction
endpackage
