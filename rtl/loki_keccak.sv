// loki_keccak: Keccak-f[1600] permutation accelerator, the hash engine
// behind the SHA-3 and SHAKE functions Kyber uses.
//
// The 1600-bit state is held as 25 lanes of 64 bits, lane index x + 5*y.
// After start_i the core applies the 24 rounds of Keccak-f[1600], one round
// (theta, rho, pi, chi, iota) per cycle. done_o is a one-cycle pulse that
// the clock edge 25 cycles after the one that sampled start_i samples (the
// start cycle plus 24 rounds); busy_o is high in between. The host absorbs and squeezes by writing and reading lanes while
// the core is idle: lane_we_i writes the 32-bit halves of lane lane_idx_i
// selected by lane_half_i (bit 0 low half, bit 1 high half); lane_rdata_o
// shows lane lane_idx_i combinationally. Padding and XOR-ing of message
// blocks are left to software.
//
// The document gives the state size, the 24 rounds and the five steps and
// points elsewhere for the accelerator itself; the round-per-cycle
// organisation and the lane interface are this design's choice. Rotation
// offsets and round constants are computed at elaboration with the
// recurrences of the SHA-3 standard.
module loki_keccak (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        start_i,
  output logic        busy_o,
  output logic        done_o,
  input  logic        lane_we_i,
  input  logic [1:0]  lane_half_i,
  input  logic [4:0]  lane_idx_i,
  input  logic [63:0] lane_wdata_i,
  output logic [63:0] lane_rdata_o
);
  localparam int unsigned ROUNDS = 24;

  typedef logic [63:0] lane_t;
  typedef lane_t       state_t [25];
  typedef int unsigned rot_t   [25];
  typedef lane_t       rc_t    [ROUNDS];

  // rho offsets: r(1,0) = 1, then (x,y) <- (y, 2x+3y) with offset (t+1)(t+2)/2
  function automatic rot_t calc_rot();
    rot_t r;
    int unsigned x, y, nx;
    for (int i = 0; i < 25; i++) r[i] = 0;
    x = 1; y = 0;
    for (int unsigned t = 0; t < 24; t++) begin
      r[x + 5*y] = ((t + 1) * (t + 2) / 2) % 64;
      nx = y;
      y  = (2*x + 3*y) % 5;
      x  = nx;
    end
    return r;
  endfunction

  // rc(t): output bit of the LFSR x^8 + x^6 + x^5 + x^4 + 1
  function automatic logic rc_bit(int unsigned t);
    int unsigned r;
    r = 1;
    for (int unsigned i = 0; i < t % 255; i++) begin
      r = r << 1;
      if ((r & 32'h100) != 0) r = r ^ 32'h171;
      r = r & 32'hFF;
    end
    return (r & 1) != 0;
  endfunction

  function automatic rc_t calc_rc();
    rc_t c;
    for (int unsigned ir = 0; ir < ROUNDS; ir++) begin
      c[ir] = '0;
      for (int unsigned j = 0; j < 7; j++)
        if (rc_bit(j + 7*ir)) c[ir] = c[ir] | (64'd1 << ((1 << j) - 1));
    end
    return c;
  endfunction

  localparam rot_t ROT = calc_rot();
  localparam rc_t  RC  = calc_rc();

  function automatic lane_t rol(lane_t v, int unsigned n);
    return (n == 0) ? v : ((v << n) | (v >> (64 - n)));
  endfunction

  function automatic state_t round_f(state_t a, lane_t rc);
    lane_t  c [5];
    lane_t  d [5];
    state_t b, o;
    for (int x = 0; x < 5; x++) c[x] = a[x] ^ a[x+5] ^ a[x+10] ^ a[x+15] ^ a[x+20];
    for (int x = 0; x < 5; x++) d[x] = c[(x+4)%5] ^ rol(c[(x+1)%5], 1);
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        b[y + 5*((2*x + 3*y) % 5)] = rol(a[x + 5*y] ^ d[x], ROT[x + 5*y]);
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        o[x + 5*y] = b[x + 5*y] ^ (~b[(x+1)%5 + 5*y] & b[(x+2)%5 + 5*y]);
    o[0] = o[0] ^ rc;
    return o;
  endfunction

  state_t st_q, st_next;
  logic [4:0] rnd_q;
  logic       busy_q, done_q;

  always_comb st_next = round_f(st_q, RC[rnd_q]);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int i = 0; i < 25; i++) st_q[i] <= '0;
      rnd_q  <= '0;
      busy_q <= 1'b0;
      done_q <= 1'b0;
    end else begin
      done_q <= 1'b0;
      if (busy_q) begin
        st_q <= st_next;
        if (rnd_q == 5'(ROUNDS - 1)) begin
          busy_q <= 1'b0;
          done_q <= 1'b1;
          rnd_q  <= '0;
        end else begin
          rnd_q <= rnd_q + 5'd1;
        end
      end else if (start_i) begin
        busy_q <= 1'b1;
        rnd_q  <= '0;
      end else if (lane_we_i && lane_idx_i < 5'd25) begin
        if (lane_half_i[0]) st_q[lane_idx_i][31:0]  <= lane_wdata_i[31:0];
        if (lane_half_i[1]) st_q[lane_idx_i][63:32] <= lane_wdata_i[63:32];
      end
    end
  end

  assign lane_rdata_o = (lane_idx_i < 5'd25) ? st_q[lane_idx_i] : '0;
  assign busy_o = busy_q;
  assign done_o = done_q;
endmodule
