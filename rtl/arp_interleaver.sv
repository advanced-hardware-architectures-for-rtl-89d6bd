// arp_interleaver: (de-)interleaver multiplexer network of the 128-bit frame slot.
//
// Permutes the systematic value, extrinsic value and hard decision of every
// position of a frame slot according to the frame configuration (one 128-bit
// frame, 2 x 64, 4 x 32 or 64 + 2 x 32 bits, frames packed from position 0)
// and the direction: PERM_PI gives out[base+i] = in[base+PI_K(i)],
// PERM_PI_INV the inverse, PERM_NONE leaves the slot as it is. PI_K is the ARP
// interleaver PI_K(i) = (9 i + S[i mod 4]) mod K with S = {3, 13, 27, 5}.
// Parity values stay in place: parity 1 is stored in natural order, parity 2
// in interleaved order.
//
// The source of each output position is a compile-time constant per
// (direction, configuration), so each output is a small multiplexer; where the
// sources of several configurations coincide, synthesis reduces it to a wire.
// Purely combinational.
module arp_interleaver
  import tdec_pkg::*;
(
  input  perm_e perm,
  input  cfg_e  cfg,
  input  pos_t  din  [K_MAX],
  output pos_t  dout [K_MAX]
);
  function automatic pos_t take(input pos_t keep, input pos_t src);
    pos_t r;
    r          = keep;
    r.chan.sys = src.chan.sys;
    r.ext      = src.ext;
    r.hd       = src.hd;
    return r;
  endfunction

  for (genvar o = 0; o < K_MAX; o++) begin : g_out
    localparam int F0 = perm_src(CFG_128,      PERM_PI, o);
    localparam int F1 = perm_src(CFG_64_64,    PERM_PI, o);
    localparam int F2 = perm_src(CFG_32X4,     PERM_PI, o);
    localparam int F3 = perm_src(CFG_64_32_32, PERM_PI, o);
    localparam int I0 = perm_src(CFG_128,      PERM_PI_INV, o);
    localparam int I1 = perm_src(CFG_64_64,    PERM_PI_INV, o);
    localparam int I2 = perm_src(CFG_32X4,     PERM_PI_INV, o);
    localparam int I3 = perm_src(CFG_64_32_32, PERM_PI_INV, o);

    always_comb begin
      dout[o] = din[o];
      case (perm)
        PERM_PI: begin
          case (cfg)
            CFG_128:   dout[o] = take(din[o], din[F0]);
            CFG_64_64: dout[o] = take(din[o], din[F1]);
            CFG_32X4:  dout[o] = take(din[o], din[F2]);
            default:   dout[o] = take(din[o], din[F3]);
          endcase
        end
        PERM_PI_INV: begin
          case (cfg)
            CFG_128:   dout[o] = take(din[o], din[I0]);
            CFG_64_64: dout[o] = take(din[o], din[I1]);
            CFG_32X4:  dout[o] = take(din[o], din[I2]);
            default:   dout[o] = take(din[o], din[I3]);
          endcase
        end
        default: ;
      endcase
    end
  end
endmodule
