// efpga_top_tb -- end-to-end test of the eFPGA fabric on a 4 x 4 CLB array with 16-wire
// channels and wires two segments long; efpga_full_tb runs the same test with every parameter
// at its default (8 x 8, length-4 wires).
//
// The testbench acts as a small place-and-route tool: it places user circuits in chosen
// slices, routes every net through the switch and connection blocks with a breadth-first
// search over the routing graph (rules written out here from the fabric's routing
// definition), assembles the bitstream, shifts it into the configuration memory and then
// drives the IO pads with random stimuli, comparing the pads it routed outputs to with a
// cycle-accurate software model of the user circuits.
//
// User circuits:
//   1. a bit-serial adder in one slice (sum: XOR3, bypassed; carry: majority, registered and
//      fed back to the slice through the routing), the core of the modular additions that
//      ciphers such as Speck use;
//   2. three slices that between them use the other six cFA functions (XNOR, NOT, XOR2,
//      OR, AND, buffer) with registered and bypassed outputs;
//   3. a 3-stage shift register built from registered buffer functions (mode "E") chained
//      through the routing;
//   4. a net from an input pad to an output pad across the array, through routing only.
// Mechanisms counted (each must occur at least once): every one of the eight cFA
// functions, registered and bypassed outputs, switch-block multiplexers fed by an IO pad, by
// a CLB output, by a wire going straight on and by a turning wire, wires passing through a
// switch block, multiplexers in partial (edge) switch blocks, and the bitstream load taking
// one clock per configuration bit with the read-back bit matching.
module efpga_top_tb;
  import efpga_pkg::*;

  localparam int W = 4, H = 4, CW = 16, SEG_LEN = 2;
  localparam int HW = CW / 2;
  localparam int NUM_IO = 2 * W + 2 * H;
  localparam int CFG_BITS = total_cfg_bits(W, H, CW, SEG_LEN);
  localparam int NWIRE = (W + 1) * (H + 1) * 4 * HW;

  logic clk = 0, rst_n = 0, por_n = 0, cfg_en = 0, cfg_in = 0, cfg_out;
  logic [NUM_IO-1:0] io_in = '0, io_out;

  efpga_top #(.W(W), .H(H), .SEG_LEN(SEG_LEN)) dut (.clk, .rst_n, .por_n, .cfg_en, .cfg_in, .cfg_out, .io_in, .io_out);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [CFG_BITS-1:0] img;

  // mechanism counters
  int n_mode [2][4];
  int n_reg, n_byp, n_src_io, n_src_clb, n_straight, n_turn, n_pass, n_partial;

  // ------------------------------------------------------------ routing-graph rules
  function automatic bit has_side(int x, int y, int s);
    case (s)
      0: return y < H;
      1: return x < W;
      2: return y > 0;
      default: return x > 0;
    endcase
  endfunction

  function automatic bit starts(int x, int y, int s, int t);
    if (!has_side(x, y, s)) return 0;
    if (!has_side(x, y, (s + 2) % 4)) return 1;
    return (((s % 2 == 0) ? y : x) + t) % SEG_LEN == 0;
  endfunction

  function automatic int n_sides(int x, int y);
    return int'(has_side(x, y, 0)) + int'(has_side(x, y, 1)) + int'(has_side(x, y, 2)) +
           int'(has_side(x, y, 3));
  endfunction

  function automatic int n_io(int x, int y);
    return int'(y == 0 && x >= 1) + int'(y == H && x >= 1) + int'(x == 0 && y >= 1) +
           int'(x == W && y >= 1);
  endfunction

  function automatic int wid(int x, int y, int s, int t);
    return ((x * (H + 1) + y) * 4 + s) * HW + t;
  endfunction

  // input index (0-based) of arriving track (sp, j) in the mux of (x,y,s,t), or -1
  function automatic int idx_track(int x, int y, int s, int t, int sp, int j);
    int n = 0;
    for (int q = 0; q < 4; q++) begin
      if (q == s || !has_side(x, y, q)) continue;
      for (int i = 0; i < SEG_LEN; i++) begin
        int rot;
        rot = (q == (s + 2) % 4) ? 0 : (q == (s + 1) % 4) ? SEG_LEN : HW - SEG_LEN;
        if (q == sp && (t + i + rot) % HW == j) return n;
        n++;
      end
    end
    return -1;
  endfunction

  function automatic int idx_clb(int x, int y, int s, int t, int o);
    int n, o1;
    n = (n_sides(x, y) - 1) * SEG_LEN;
    o1 = (2 * (t / SEG_LEN + s)) % 8;
    if (o == o1) return n;
    if (o == o1 + 1) return n + 1;
    return -1;
  endfunction

  // io pad k enters at which SB and with which index among that SB's pads
  function automatic int idx_io(int x, int y, int k);
    int m = 0;
    if (y == 0 && x >= 1) begin if (k == x - 1) return m; m++; end
    if (y == H && x >= 1) begin if (k == W + x - 1) return m; m++; end
    if (x == 0 && y >= 1) begin if (k == 2 * W + y - 1) return m; m++; end
    if (x == W && y >= 1) begin if (k == 2 * W + H + y - 1) return m; m++; end
    return -1;
  endfunction

  // ------------------------------------------------------------ bitstream helpers
  task automatic put(int off, int width, int val);
    for (int b = 0; b < width; b++) img[off + b] = 1'(val >> b);
  endtask

  task automatic set_slice(int i, int j, int q, logic [1:0] m1, logic [1:0] m2,
                           bit reg_s, bit reg_c);
    // slice word: {bypass_cout, bypass_s, side2 f1 f0, side1 f1 f0}
    put(clb_cfg_offset(i, j, W) + q * 6, 6, {~reg_c, ~reg_s, m2, m1});
    n_mode[0][m1]++;
    n_mode[1][m2]++;
    if (reg_s) n_reg++; else n_byp++;
    if (reg_c) n_reg++; else n_byp++;
    for (int s = 0; s < 4; s++)
      for (int t = 0; t < HW; t++)
        if (starts(i, j, s, t) && idx_clb(i, j, s, t, 2 * q) >= 0) reserved[wid(i, j, s, t)] = 1;
  endtask

  task automatic set_sb(int x, int y, int s, int t, int in_idx);
    int off, sw;
    off = sb_cfg_offset(x, y, W, H, CW, SEG_LEN);
    sw = sel_bits((n_sides(x, y) - 1) * SEG_LEN + 2 + n_io(x, y));
    for (int ss = 0; ss < 4; ss++)
      for (int tt = 0; tt < HW; tt++)
        if ((ss < s || (ss == s && tt < t)) && starts(x, y, ss, tt)) off += sw;
    put(off, sw, in_idx + 1);
    if (n_sides(x, y) < 4) n_partial++;
  endtask

  // ------------------------------------------------------------ router
  int owner [NWIRE];    // net occupying the wire, -1 when free
  bit reserved [NWIRE]; // wire that can carry an output of a used slice: not for other nets
  int par [NWIRE];      // wire feeding this one; -1: fed by the source; -2: already routed
  int par_idx [NWIRE];  // mux input index chosen
  int seen [NWIRE];     // search generation
  int gen = 0;

  // segment covered by step k (k = 0 first) of a wire: returns the SB it arrives at
  function automatic void step(int x, int y, int s, output int nx, output int ny);
    nx = x + ((s == 1) ? 1 : (s == 3) ? -1 : 0);
    ny = y + ((s == 0) ? 1 : (s == 2) ? -1 : 0);
  endfunction

  // Does the wire (x,y,s,t) cover the sink segment? The sink is given by the SB that drives
  // the wanted direction on it: a sink "segment after SB(sx,sy) on side ss, track any".
  // Returns the track-level wire index (0..CW-1) inside the segment, or -1.
  function automatic int covers(int x, int y, int s, int t, int kind, int cx, int cy);
    // kind 0: chanx(cx,cy), kind 1: chany(cx,cy)
    int px, py, nx, ny;
    px = x; py = y;
    forever begin
      step(px, py, s, nx, ny);
      if (kind == 0 && s == 1 && nx == cx && ny == cy) return t;
      if (kind == 0 && s == 3 && px == cx && py == cy) return HW + t;
      if (kind == 1 && s == 0 && nx == cx && ny == cy) return t;
      if (kind == 1 && s == 2 && px == cx && py == cy) return HW + t;
      if (!has_side(nx, ny, s) || starts(nx, ny, s, t)) return -1;
      px = nx; py = ny;
    end
  endfunction

  // Route a net from a source to a channel segment; programs the switch blocks and returns in
  // result the wire index inside the segment (for the connection-block / IO select) or -1.
  // Source: src_kind 0 = IO pad src (enters at its SB), 1 = CLB (ci,cj) output src.
  task automatic route(output int result, input int net, input int src_kind, input int src, input int ci,
                      input int cj, input int kind, input int cx, input int cy);
    int q [$];
    int found, res;
    gen++;
    // wires already carrying this net can be branched from
    for (int w = 0; w < NWIRE; w++)
      if (owner[w] == net) begin
        seen[w] = gen; par[w] = -2; q.push_back(w);
      end
    // seed: starting muxes that can take the source directly
    for (int x = 0; x <= W; x++)
      for (int y = 0; y <= H; y++) begin
        int k;
        if (src_kind == 0) begin
          k = idx_io(x, y, src);
          if (k < 0) continue;
          k += (n_sides(x, y) - 1) * SEG_LEN + 2;
        end else begin
          if (((x < 1) ? 1 : x) != ci || ((y < 1) ? 1 : y) != cj) continue;
          k = 0;
        end
        for (int s = 0; s < 4; s++)
          for (int t = 0; t < HW; t++) begin
            int w, kk;
            if (!starts(x, y, s, t)) continue;
            w = wid(x, y, s, t);
            if (owner[w] >= 0 || seen[w] == gen) continue;
            kk = (src_kind == 0) ? k : idx_clb(x, y, s, t, src);
            if (kk < 0) continue;
            seen[w] = gen; par[w] = -1; par_idx[w] = kk;
            q.push_back(w);
          end
      end
    found = -1;
    while (q.size() > 0 && found < 0) begin
      int w, x, y, s, t, px, py, nx, ny;
      w = q.pop_front();
      t = w % HW; s = (w / HW) % 4; y = (w / HW / 4) % (H + 1); x = w / HW / 4 / (H + 1);
      res = covers(x, y, s, t, kind, cx, cy);
      if (res >= 0) begin found = w; break; end
      // expand at every SB the wire reaches
      px = x; py = y;
      forever begin
        int sp;
        step(px, py, s, nx, ny);
        sp = (s + 2) % 4;   // arrives from the opposite side
        for (int s2 = 0; s2 < 4; s2++)
          for (int t2 = 0; t2 < HW; t2++) begin
            int w2, kk;
            if (!starts(nx, ny, s2, t2)) continue;
            w2 = wid(nx, ny, s2, t2);
            if (owner[w2] >= 0 || reserved[w2] || seen[w2] == gen) continue;
            kk = idx_track(nx, ny, s2, t2, sp, t);
            if (kk < 0) continue;
            seen[w2] = gen; par[w2] = w; par_idx[w2] = kk;
            q.push_back(w2);
          end
        if (!has_side(nx, ny, s) || starts(nx, ny, s, t)) break;
        px = nx; py = ny;
      end
    end
    result = -1;
    if (found < 0) return;
    // commit the path
    for (int w = found; w >= 0 && par[w] != -2; w = par[w]) begin
      int x, y, s, t;
      t = w % HW; s = (w / HW) % 4; y = (w / HW / 4) % (H + 1); x = w / HW / 4 / (H + 1);
      owner[w] = net;
      set_sb(x, y, s, t, par_idx[w]);
      if (par[w] < 0) begin
        if (src_kind == 0) n_src_io++; else n_src_clb++;
      end else begin
        int pt, ps, py2, px2, ax, ay, len;
        pt = par[w] % HW; ps = (par[w] / HW) % 4;
        if (ps == s) n_straight++; else n_turn++;
        // did the parent wire pass through a switch block before reaching this one?
        py2 = (par[w] / HW / 4) % (H + 1); px2 = par[w] / HW / 4 / (H + 1);
        len = (x - px2) + (y - py2);
        if (len < 0) len = -len;
        if (len > 1) n_pass++;
      end
    end
    // a sink reached on a later segment of the last wire is a pass-through too
    begin
      int t, s, y, x;
      t = found % HW; s = (found / HW) % 4; y = (found / HW / 4) % (H + 1);
      x = found / HW / 4 / (H + 1);
      if ((kind == 0 && s == 1 && cx != x + 1) || (kind == 0 && s == 3 && cx != x) ||
          (kind == 1 && s == 0 && cy != y + 1) || (kind == 1 && s == 2 && cy != y))
        n_pass++;
    end
    result = res;
  endtask

  // route a source to CLB pin p of CLB (i,j)
  task automatic route_pin(int src_kind, int src, int ci, int cj, int i, int j, int p);
    int q, kind, cx, cy, wsel;
    q = p / 6;
    case (q)
      0: begin kind = 0; cx = i;     cy = j;     end
      1: begin kind = 1; cx = i;     cy = j;     end
      2: begin kind = 0; cx = i;     cy = j - 1; end
      default: begin kind = 1; cx = i - 1; cy = j; end
    endcase
    route(wsel, (src_kind == 0) ? src : 1000 + (ci * (H + 1) + cj) * 8 + src,
          src_kind, src, ci, cj, kind, cx, cy);
    if (wsel < 0) begin
      failures++;
      $display("FAIL no route to CLB(%0d,%0d) pin %0d", i, j, p);
    end else begin
      put(cb_cfg_offset(i, j, W, H, CW) + p * sel_bits(CW), sel_bits(CW), wsel + 1);
    end
  endtask

  // segment next to IO pad k
  task automatic pad_segment(int k, output int kind, output int cx, output int cy);
    if (k < W) begin kind = 0; cx = k + 1; cy = 0; end
    else if (k < 2 * W) begin kind = 0; cx = k - W + 1; cy = H; end
    else if (k < 2 * W + H) begin kind = 1; cx = 0; cy = k - 2 * W + 1; end
    else begin kind = 1; cx = W; cy = k - 2 * W - H + 1; end
  endtask

  // route input pad src straight to output pad k (a net through routing only)
  task automatic route_io(int src, int k);
    int kind, cx, cy, wsel;
    pad_segment(k, kind, cx, cy);
    route(wsel, src, 0, src, 0, 0, kind, cx, cy);
    if (wsel < 0) begin
      failures++;
      $display("FAIL no route from pad %0d to pad %0d", src, k);
    end else begin
      put(io_cfg_offset(k, W, H, CW, SEG_LEN), io_cfg_bits(CW), wsel + 1);
    end
  endtask

  // route CLB (ci,cj) output o to IO pad k
  task automatic route_out(int ci, int cj, int o, int k);
    int kind, cx, cy, wsel;
    if (k < W) begin kind = 0; cx = k + 1; cy = 0; end
    else if (k < 2 * W) begin kind = 0; cx = k - W + 1; cy = H; end
    else if (k < 2 * W + H) begin kind = 1; cx = 0; cy = k - 2 * W + 1; end
    else begin kind = 1; cx = W; cy = k - 2 * W - H + 1; end
    route(wsel, 1000 + (ci * (H + 1) + cj) * 8 + o, 1, o, ci, cj, kind, cx, cy);
    if (wsel < 0) begin
      failures++;
      $display("FAIL no route from CLB(%0d,%0d) out %0d to pad %0d", ci, cj, o, k);
    end else begin
      put(io_cfg_offset(k, W, H, CW, SEG_LEN), io_cfg_bits(CW), wsel + 1);
    end
  endtask

  // ------------------------------------------------------------ placement
  // pads
  localparam int P_A = 8, P_B = 9, P_C = 2, P_D = 7;             // inputs
  localparam int P_SUM = 0, P_CR = 1;                            // adder outputs
  localparam int P_XNOR = 12, P_OR = 13, P_NOT = 14, P_AND = 15; // circuit 2 outputs
  localparam int P_FT = 4;                                      // feed-through output
  localparam int P_XOR2 = 10, P_BUF = 11, P_SR = 5;              // circuit 2/3 outputs

  task automatic place_and_route();
    img = '0;
    for (int w = 0; w < NWIRE; w++) begin
      owner[w] = -1;
      reserved[w] = 0;
    end
    // circuit 1: serial adder in CLB(2,2) slice 0: S = A^B^C (bypassed), Cout = maj(D,E,F) reg
    set_slice(2, 2, 0, 2'b01, 2'b01, 1'b0, 1'b1);
    // circuit 2 in CLB(3,3): slice 1 XNOR(a,b) reg / OR(c,d) reg,
    // slice 2 NOT(b) bypass / AND(c,d) bypass, slice 3 XOR2(b,c) reg / BUF(d) bypass
    set_slice(3, 3, 1, 2'b11, 2'b11, 1'b1, 1'b1);
    set_slice(3, 3, 2, 2'b10, 2'b00, 1'b0, 1'b0);
    set_slice(3, 3, 3, 2'b00, 2'b10, 1'b1, 1'b0);
    // circuit 3: shift register d -> CLB(2,4) -> CLB(4,3) -> CLB(3,1), registered buffers
    set_slice(2, 4, 0, 2'b00, 2'b10, 1'b0, 1'b1);
    set_slice(4, 3, 2, 2'b00, 2'b10, 1'b0, 1'b1);
    set_slice(3, 1, 1, 2'b00, 2'b10, 1'b0, 1'b1);
    // nets leaving CLBs first: a CLB output can enter the routing through few multiplexers
    route_pin(1, 1, 2, 2, 2, 2, 2);      // C = carry (own Cout)
    route_pin(1, 1, 2, 2, 2, 2, 5);      // F = carry
    route_out(2, 2, 0, P_SUM);
    route_out(2, 2, 1, P_CR);
    route_out(3, 3, 2, P_XNOR);
    route_out(3, 3, 3, P_OR);
    route_out(3, 3, 4, P_NOT);
    route_out(3, 3, 5, P_AND);
    route_out(3, 3, 6, P_XOR2);
    route_out(3, 3, 7, P_BUF);
    route_pin(1, 1, 2, 4, 4, 3, 16);
    route_pin(1, 5, 4, 3, 3, 1, 10);
    route_out(3, 1, 3, P_SR);
    // then the nets coming from input pads
    route_io(P_D, P_FT);
    route_pin(0, P_A, 0, 0, 2, 2, 0);    // A = a
    route_pin(0, P_B, 0, 0, 2, 2, 1);    // B = b
    route_pin(0, P_A, 0, 0, 2, 2, 3);    // D = a
    route_pin(0, P_B, 0, 0, 2, 2, 4);    // E = b
    route_pin(0, P_A, 0, 0, 3, 3, 6);
    route_pin(0, P_B, 0, 0, 3, 3, 7);
    route_pin(0, P_C, 0, 0, 3, 3, 9);
    route_pin(0, P_D, 0, 0, 3, 3, 10);
    route_pin(0, P_B, 0, 0, 3, 3, 13);
    route_pin(0, P_C, 0, 0, 3, 3, 16);
    route_pin(0, P_D, 0, 0, 3, 3, 17);
    route_pin(0, P_B, 0, 0, 3, 3, 19);
    route_pin(0, P_C, 0, 0, 3, 3, 20);
    route_pin(0, P_D, 0, 0, 3, 3, 22);
    route_pin(0, P_D, 0, 0, 2, 4, 4);
  endtask

  // ------------------------------------------------------------ simulation
  logic carry_m, xnor_q, or_q, xor2_q, sr1, sr2, sr3;
  int load_cycles;

  initial begin
    for (int a = 0; a < 2; a++) for (int b = 0; b < 4; b++) n_mode[a][b] = 0;
    n_reg = 0; n_byp = 0; n_src_io = 0; n_src_clb = 0;
    n_straight = 0; n_turn = 0; n_pass = 0; n_partial = 0;
    for (int w = 0; w < NWIRE; w++) seen[w] = 0;
    place_and_route();
    $display("bitstream: %0d bits", CFG_BITS);

    // power-on reset clears the configuration memory
    @(negedge clk);
    @(negedge clk);
    por_n = 1;
    // load the bitstream, bit 0 first
    load_cycles = 0;
    for (int k = 0; k < CFG_BITS; k++) begin
      @(negedge clk);
      cfg_en = 1;
      cfg_in = img[k];
      @(posedge clk);
      load_cycles++;
    end
    @(negedge clk);
    cfg_en = 0;
    checks += 2;
    if (load_cycles != CFG_BITS) failures++;
    if (cfg_out !== img[0]) begin
      failures++;
      $display("FAIL cfg_out read-back");
    end

    // reset the user flip-flops
    rst_n = 0;
    @(negedge clk);
    @(negedge clk);
    rst_n = 1;
    {carry_m, xnor_q, or_q, xor2_q, sr1, sr2, sr3} = '0;

    for (int cyc = 0; cyc < 2000; cyc++) begin
      logic a, b, c, d;
      a = 1'($urandom); b = 1'($urandom); c = 1'($urandom); d = 1'($urandom);
      io_in[P_A] = a; io_in[P_B] = b; io_in[P_C] = c; io_in[P_D] = d;
      #1;
      // combinational (bypassed) outputs and registered outputs before the edge
      chk(io_out[P_SUM], a ^ b ^ carry_m, "serial sum");
      chk(io_out[P_CR], carry_m, "serial carry");
      chk(io_out[P_XNOR], xnor_q, "xnor reg");
      chk(io_out[P_OR], or_q, "or reg");
      chk(io_out[P_NOT], ~b, "not");
      chk(io_out[P_AND], c & d, "and");
      chk(io_out[P_XOR2], xor2_q, "xor2 reg");
      chk(io_out[P_BUF], d, "buffer");
      chk(io_out[P_SR], sr3, "shift register");
      chk(io_out[P_FT], d, "pad to pad");
      @(posedge clk);
      carry_m = (a & b) | (a & carry_m) | (b & carry_m);
      xnor_q = ~(a ^ b);
      or_q = c | d;
      xor2_q = b ^ c;
      sr3 = sr2; sr2 = sr1; sr1 = d;
      @(negedge clk);
    end

    // every mechanism must have happened
    for (int p = 0; p < 2; p++)
      for (int m = 0; m < 4; m++) need(n_mode[p][m], $sformatf("cFA side %0d mode %0d", p + 1, m));
    need(n_reg, "registered output");
    need(n_byp, "bypassed output");
    need(n_src_io, "SB mux fed by IO pad");
    need(n_src_clb, "SB mux fed by CLB output");
    need(n_straight, "SB mux fed by wire going straight");
    need(n_turn, "SB mux fed by turning wire");
    need(n_pass, "wire passing through an SB");
    need(n_partial, "mux in a partial SB");
    $display("mechanisms: reg=%0d byp=%0d io=%0d clb=%0d straight=%0d turn=%0d pass=%0d partial=%0d",
             n_reg, n_byp, n_src_io, n_src_clb, n_straight, n_turn, n_pass, n_partial);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %b exp %b at %0t", what, got, exp, $time);
    end
  endtask

  task automatic need(int n, string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    repeat (CFG_BITS + 10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
