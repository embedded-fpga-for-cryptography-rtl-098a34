// switch_block -- unidirectional Wilton-style switch block at channel crossing (X,Y).
//
// Up to four channel segments meet here (sides N=0, E=1, S=2, W=3; at the fabric edge a
// side is missing, making a partial switch block). On each side CW/2 wires arrive (in_w)
// and CW/2 wires leave (out_w). Wires span SEG_LEN channel segments, staggered per track:
// an outgoing track t starts here when (pos + t) % SEG_LEN == 0 (pos = X for E/W, Y for N/S)
// or when the opposite side is missing; such a track is driven by a configurable
// multiplexer, every other outgoing track simply continues the wire arriving on the
// opposite side.
//
// Multiplexer inputs, in select order (select k picks input k-1, 0 drives 0):
//   for each other existing side s' (in order N, E, S, W): the SEG_LEN arriving tracks
//     (t + i + rot) % (CW/2), i = 0..SEG_LEN-1, where rot = 0 going straight on,
//     SEG_LEN when s' = s+1 and CW/2-SEG_LEN when s' = s+3 (mod 4);
//   two CLB outputs, clb_out[o] and clb_out[o+1] with o = 2*(t/SEG_LEN + s) mod 8;
//   the IO input pads that enter the fabric here (NIO of them).
// Every arriving wire thus reaches one multiplexer on each of the other three sides
// (flexibility Fs = 3) and every multiplexer gets two CLB outputs, which is how the thesis
// counts switch-block multiplexers and their inputs. The exact track permutation (the rot
// values) and the choice of CLB outputs are this design's own.
// Configuration: for s = 0..3, t = 0..CW/2-1, each starting track takes sel_bits(inputs)
// bits, packed from bit 0 upwards. Combinational.
//
// Routing in an FPGA forms cycles by nature (a wire can be steered around a ring of switch
// blocks), so tools see a combinational loop through this block in the assembled fabric.
// With all selects at 0 every multiplexer drives 0; only a bitstream that closes a ring on
// purpose makes such a loop active.
module switch_block
  import efpga_pkg::*;
#(
  parameter int W       = 8,
  parameter int H       = 8,
  parameter int X       = 1,
  parameter int Y       = 1,
  parameter int CW      = 16,
  parameter int SEG_LEN = 4,
  parameter int CFG_W   = sb_cfg_bits(X, Y, W, H, CW, SEG_LEN)
) (
  input  logic [3:0][CW/2-1:0]     in_w,
  output logic [3:0][CW/2-1:0]     out_w,
  input  logic [CLB_OUTPUTS-1:0]   clb_out,
  input  logic [1:0]               io_in,
  input  logic [CFG_W-1:0]         cfg
);
  localparam int HW   = CW / 2;
  localparam int NIO  = sb_num_io(X, Y, W, H);
  localparam int NIN  = sb_mux_inputs(X, Y, W, H, SEG_LEN);
  localparam int SW   = sel_bits(NIN);

  // Configuration offset of the multiplexer of track t on side s.
  function automatic int mux_offset(input int s, input int t);
    int n;
    n = 0;
    for (int ss = 0; ss < 4; ss++)
      for (int tt = 0; tt < HW; tt++)
        if ((ss < s || (ss == s && tt < t)) && sb_track_starts(X, Y, ss, tt, W, H, SEG_LEN))
          n += SW;
    return n;
  endfunction

  function automatic int rot_of(input int s, input int sp);
    if (sp == (s + 2) % 4) return 0;
    if (sp == (s + 1) % 4) return SEG_LEN % HW;
    return (HW - SEG_LEN % HW) % HW;
  endfunction

  for (genvar s = 0; s < 4; s++) begin : g_side
    for (genvar t = 0; t < HW; t++) begin : g_track
      if (sb_track_starts(X, Y, s, t, W, H, SEG_LEN)) begin : g_mux
        logic [NIN-1:0] mux_in;
        always_comb begin
          int k;
          int o;
          k = 0;
          mux_in = '0;
          for (int sp = 0; sp < 4; sp++) begin
            if (sp != s && sb_side_exists(X, Y, sp, W, H)) begin
              for (int i = 0; i < SEG_LEN; i++) begin
                mux_in[k] = in_w[sp][(t + i + rot_of(s, sp)) % HW];
                k++;
              end
            end
          end
          o = (2 * (t / SEG_LEN + s)) % CLB_OUTPUTS;
          mux_in[k]     = clb_out[o];
          mux_in[k + 1] = clb_out[o + 1];
          k += 2;
          for (int m = 0; m < NIO; m++) mux_in[k + m] = io_in[m];
        end
        cfg_mux #(.N(NIN), .SEL_W(SW)) u_mux (
          .in (mux_in),
          .sel(cfg[mux_offset(s, t) +: SW]),
          .out(out_w[s][t])
        );
      end else if (sb_side_exists(X, Y, s, W, H)) begin : g_pass
        assign out_w[s][t] = in_w[(s + 2) % 4][t];
      end else begin : g_none
        assign out_w[s][t] = 1'b0;
      end
    end
  end
endmodule
