// sb_check -- drives and checks one switch_block instance (helper of switch_block_tb).
//
// Rebuilds, from the routing rules of the fabric, which outgoing tracks start a wire and
// what each of their multiplexer inputs must be, then checks:
//   1. tracks that do not start here continue the wire arriving on the opposite side, and
//      missing sides drive 0;
//   2. every select value of every multiplexer (0 = off, k = input k-1);
//   3. for a switch block with four sides: each arriving wire reaches exactly one
//      multiplexer on each of the three other sides and none on its own side (Fs = 3).
module sb_check
  import efpga_pkg::*;
#(
  parameter int W = 8, parameter int H = 8, parameter int X = 3, parameter int Y = 2,
  parameter int CW = 16, parameter int SEG_LEN = 4
) (
  output int checks,
  output int failures,
  output bit done
);
  localparam int HW    = CW / 2;
  localparam int CFG_W = sb_cfg_bits(X, Y, W, H, CW, SEG_LEN);

  logic [3:0][HW-1:0] in_w, out_w;
  logic [7:0] clb_out;
  logic [1:0] io_in;
  logic [CFG_W-1:0] cfg;

  switch_block #(.W(W), .H(H), .X(X), .Y(Y), .CW(CW), .SEG_LEN(SEG_LEN)) dut (
    .in_w, .out_w, .clb_out, .io_in, .cfg
  );

  function automatic bit has(input int s);
    case (s)
      0: return Y < H;
      1: return X < W;
      2: return Y > 0;
      default: return X > 0;
    endcase
  endfunction

  function automatic bit starts(input int s, input int t);
    if (!has(s)) return 0;
    if (!has((s + 2) % 4)) return 1;
    return (((s % 2 == 0) ? Y : X) + t) % SEG_LEN == 0;
  endfunction

  function automatic int nio();
    return int'(Y == 0 && X >= 1) + int'(Y == H && X >= 1) + int'(X == 0 && Y >= 1) +
           int'(X == W && Y >= 1);
  endfunction

  function automatic int nsides();
    return int'(has(0)) + int'(has(1)) + int'(has(2)) + int'(has(3));
  endfunction

  localparam int NIN = (int'(Y < H) + int'(X < W) + int'(Y > 0) + int'(X > 0) - 1) * SEG_LEN
                       + 2 + (int'(Y == 0 && X >= 1) + int'(Y == H && X >= 1)
                       + int'(X == 0 && Y >= 1) + int'(X == W && Y >= 1));
  localparam int SW  = $clog2(NIN + 1);

  function automatic int field(input int s, input int t);
    int n = 0;
    for (int ss = 0; ss < 4; ss++)
      for (int tt = 0; tt < HW; tt++)
        if ((ss < s || (ss == s && tt < t)) && starts(ss, tt)) n += SW;
    return n;
  endfunction

  // expected value of input k (0-based) of the multiplexer of track t on side s
  function automatic logic mux_input(input int s, input int t, input int k);
    int n = 0;
    for (int sp = 0; sp < 4; sp++) begin
      if (sp == s || !has(sp)) continue;
      for (int i = 0; i < SEG_LEN; i++) begin
        int rot;
        rot = (sp == (s + 2) % 4) ? 0 : (sp == (s + 1) % 4) ? SEG_LEN : HW - SEG_LEN;
        if (n == k) return in_w[sp][(t + i + rot) % HW];
        n++;
      end
    end
    if (k == n)     return clb_out[(2 * (t / SEG_LEN + s)) % 8];
    if (k == n + 1) return clb_out[(2 * (t / SEG_LEN + s)) % 8 + 1];
    return io_in[k - n - 2];
  endfunction

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL SB(%0d,%0d) %s got %b exp %b", X, Y, what, got, exp);
    end
  endtask

  initial begin
    checks = 0;
    failures = 0;
    done = 0;
    #1;
    if (CFG_W != sb_cfg_bits(X, Y, W, H, CW, SEG_LEN) || nsides() < 2) begin
      failures++;
    end
    // 1. pass-through and missing sides
    for (int r = 0; r < 20; r++) begin
      in_w = 32'($urandom);
      clb_out = 8'($urandom);
      io_in = 2'($urandom);
      for (int b = 0; b < CFG_W; b++) cfg[b] = 1'($urandom);
      #1;
      for (int s = 0; s < 4; s++)
        for (int t = 0; t < HW; t++)
          if (!has(s)) chk(out_w[s][t], 1'b0, "missing side");
          else if (!starts(s, t)) chk(out_w[s][t], in_w[(s + 2) % 4][t], "pass-through");
    end
    // 2. every select of every multiplexer
    for (int s = 0; s < 4; s++)
      for (int t = 0; t < HW; t++)
        if (starts(s, t))
          for (int k = 0; k <= NIN; k++)
            for (int r = 0; r < 4; r++) begin
              in_w = 32'($urandom);
              clb_out = 8'($urandom);
              io_in = 2'($urandom);
              cfg = '0;
              cfg[field(s, t) +: SW] = SW'(k);
              #1;
              chk(out_w[s][t], (k == 0) ? 1'b0 : mux_input(s, t, k - 1), "mux select");
            end
    // 3. flexibility Fs = 3 for full switch blocks
    if (nsides() == 4) begin
      for (int sp = 0; sp < 4; sp++)
        for (int j = 0; j < HW; j++) begin
          int hits [4];
          hits = '{0, 0, 0, 0};
          for (int s = 0; s < 4; s++)
            for (int t = 0; t < HW; t++)
              if (starts(s, t)) begin
                automatic int found = 0;
                for (int k = 1; k <= NIN; k++) begin
                  in_w = '0;
                  in_w[sp][j] = 1'b1;
                  clb_out = '0;
                  io_in = '0;
                  cfg = '0;
                  cfg[field(s, t) +: SW] = SW'(k);
                  #1;
                  if (out_w[s][t]) found = 1;
                end
                hits[s] += found;
              end
          for (int s = 0; s < 4; s++) begin
            checks++;
            if (hits[s] != ((s == sp) ? 0 : 1)) begin
              failures++;
              $display("FAIL SB(%0d,%0d) Fs: wire %0d/%0d reaches %0d muxes on side %0d",
                       X, Y, sp, j, hits[s], s);
            end
          end
        end
    end
    done = 1;
  end
endmodule
