// tb_loki_keccak: self-checking testbench of the Keccak-f[1600] core.
// Checks
//   * the permutation of the all-zero state (first lane F1258F7940E1DDE7),
//   * SHA3-256("") and SHA3-256("abc") (one padded block absorbed into the
//     zero state, digest = first 4 lanes, little-endian),
//   * random states against a separate model written with the tabulated
//     rotation offsets and round constants of the SHA-3 standard,
//   * the start-to-done latency of 24 cycles.
module tb_loki_keccak;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start = 0, busy, done, we = 0;
  logic [1:0]  half = 2'b11;
  logic [4:0]  idx = '0;
  logic [63:0] wdata = '0, rdata;
  int checks = 0, failures = 0;

  loki_keccak dut (
    .clk_i(clk), .rst_ni(rst_n), .start_i(start), .busy_o(busy), .done_o(done),
    .lane_we_i(we), .lane_half_i(half), .lane_idx_i(idx), .lane_wdata_i(wdata),
    .lane_rdata_o(rdata)
  );

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef logic [63:0] st_t [25];

  localparam int ROTT [25] = '{ 0,  1, 62, 28, 27,
                               36, 44,  6, 55, 20,
                                3, 10, 43, 25, 39,
                               41, 45, 15, 21,  8,
                               18,  2, 61, 56, 14};
  localparam logic [63:0] RCT [24] = '{
    64'h0000000000000001, 64'h0000000000008082, 64'h800000000000808A, 64'h8000000080008000,
    64'h000000000000808B, 64'h0000000080000001, 64'h8000000080008081, 64'h8000000000008009,
    64'h000000000000008A, 64'h0000000000000088, 64'h0000000080008009, 64'h000000008000000A,
    64'h000000008000808B, 64'h800000000000008B, 64'h8000000000008089, 64'h8000000000008003,
    64'h8000000000008002, 64'h8000000000000080, 64'h000000000000800A, 64'h800000008000000A,
    64'h8000000080008081, 64'h8000000000008080, 64'h0000000080000001, 64'h8000000080008008};

  function automatic logic [63:0] rl(logic [63:0] v, int n);
    return (n == 0) ? v : ((v << n) | (v >> (64 - n)));
  endfunction

  function automatic st_t model(st_t s);
    logic [63:0] c [5], b [25];
    for (int r = 0; r < 24; r++) begin
      for (int x = 0; x < 5; x++) c[x] = s[x] ^ s[x+5] ^ s[x+10] ^ s[x+15] ^ s[x+20];
      for (int i = 0; i < 25; i++) s[i] ^= c[(i%5+4)%5] ^ rl(c[(i%5+1)%5], 1);
      for (int x = 0; x < 5; x++)
        for (int y = 0; y < 5; y++) b[y + 5*((2*x+3*y)%5)] = rl(s[x+5*y], ROTT[x+5*y]);
      for (int x = 0; x < 5; x++)
        for (int y = 0; y < 5; y++) s[x+5*y] = b[x+5*y] ^ (~b[(x+1)%5+5*y] & b[(x+2)%5+5*y]);
      s[0] ^= RCT[r];
    end
    return s;
  endfunction

  task automatic write_state(input st_t s);
    for (int i = 0; i < 25; i++) begin
      we <= 1; idx <= 5'(i); wdata <= s[i];
      // alternate full and half writes to exercise the half selects
      if (i % 3 == 0) begin
        half <= 2'b01; @(posedge clk); half <= 2'b10; @(posedge clk);
      end else begin
        half <= 2'b11; @(posedge clk);
      end
    end
    we <= 0; half <= 2'b11;
  endtask

  task automatic permute(output st_t s);
    int cyc = 0;
    start <= 1;
    @(posedge clk);
    start <= 0;
    while (!done) begin @(posedge clk); #1; cyc++; end
    @(posedge clk);
    cyc++;
    checks++;
    if (cyc != 25) begin failures++; $display("FAIL latency %0d", cyc); end
    for (int i = 0; i < 25; i++) begin
      idx <= 5'(i); @(posedge clk); #1; s[i] = rdata;
    end
  endtask

  task automatic expect_lanes(input st_t got, input st_t exp, input int n, input string name);
    for (int i = 0; i < n; i++) begin
      checks++;
      if (got[i] !== exp[i]) begin
        failures++;
        $display("FAIL %s lane %0d = %h, expected %h", name, i, got[i], exp[i]);
      end
    end
  endtask

  st_t s, got, exp;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);

    foreach (s[i]) s[i] = '0;
    write_state(s);
    permute(got);
    exp[0] = 64'hF1258F7940E1DDE7;
    expect_lanes(got, exp, 1, "zero state");
    expect_lanes(got, model(s), 25, "zero state model");

    foreach (s[i]) s[i] = '0;
    s[0] = 64'h06; s[16] = 64'h8000000000000000;
    write_state(s);
    permute(got);
    exp[0] = 64'h66d71ebff8c6ffa7; exp[1] = 64'h62d661a05647c151;
    exp[2] = 64'hfa493be44dff80f5; exp[3] = 64'h4a43f8804b0ad882;
    expect_lanes(got, exp, 4, "SHA3-256('')");

    foreach (s[i]) s[i] = '0;
    s[0] = 64'h0000000006636261; s[16] = 64'h8000000000000000;
    write_state(s);
    permute(got);
    exp[0] = 64'hb225e24fa75d983a; exp[1] = 64'hbd90d36b2d175c04;
    exp[2] = 64'h5b529d3e6e085f85; exp[3] = 64'h3215431145e2bf46;
    expect_lanes(got, exp, 4, "SHA3-256('abc')");

    for (int k = 0; k < 4; k++) begin
      foreach (s[i]) s[i] = {$urandom, $urandom};
      write_state(s);
      permute(got);
      expect_lanes(got, model(s), 25, "random");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
