// tb_loki_ctrl: self-checking testbench of the control unit.
// For an NTT on polynomial A, an INTT on polynomial B and a PWM, every
// cycle's read addresses, twiddle address, source/destination BRAM and
// write-back enables/addresses are compared with schedules built here from
// the loop structure of the Kyber reference code (NTT: len 128..2, twiddle
// index rising from 1; INTT: len 2..128, index falling from 127; PWM: pairs
// 2m, 2m+1 with twiddle 64 + m/2). Also checked: done after exactly 906 /
// 649 cycles, the swap of the current BRAM and the post-processing tags.
module tb_loki_ctrl;
  import loki_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, poly = 0, load = 0, load_poly = 0;
  op_e  op = OP_NTT;
  logic busy, done, rd_en, rd_src2_en, brom_en, mux_valid, mux_odd;
  logic wr_we0, wr_we1, wr_pwm;
  logic [1:0] cur, rd_src, rd_src2, mux_src, mux_src2, wr_dst;
  post_e [1:0] post;
  caddr_t rd_addr0, rd_addr1, wr_addr0, wr_addr1;
  logic [6:0] brom_addr;
  op_e mux_op;
  logic [2:0] mux_slot;
  int checks = 0, failures = 0;

  loki_ctrl dut (
    .clk_i(clk), .rst_ni(rst_n), .start_i(start), .op_i(op), .poly_i(poly),
    .load_i(load), .load_poly_i(load_poly), .busy_o(busy), .done_o(done),
    .cur_o(cur), .post_o(post), .rd_en_o(rd_en), .rd_src_o(rd_src),
    .rd_src2_en_o(rd_src2_en), .rd_src2_o(rd_src2), .rd_addr0_o(rd_addr0),
    .rd_addr1_o(rd_addr1), .brom_en_o(brom_en), .brom_addr_o(brom_addr),
    .mux_valid_o(mux_valid), .mux_op_o(mux_op), .mux_slot_o(mux_slot),
    .mux_odd_o(mux_odd), .mux_src_o(mux_src), .mux_src2_o(mux_src2),
    .wr_we0_o(wr_we0), .wr_we1_o(wr_we1), .wr_dst_o(wr_dst),
    .wr_addr0_o(wr_addr0), .wr_addr1_o(wr_addr1), .wr_pwm_o(wr_pwm)
  );

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected per cycle after start (index = cycle number, start cycle = 0)
  typedef struct {
    bit rd; int ra0, ra1, k, src, src2;
    bit w0, w1; int wa0, wa1, dst;
  } cyc_t;
  cyc_t sched [1000];

  function automatic void clear();
    foreach (sched[i]) sched[i] = '{0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};
  endfunction

  function automatic void build_ntt(bit inv, int p, int c);
    int t = 1, k = inv ? 127 : 1, s = 0;
    clear();
    for (int len = inv ? 2 : 128; inv ? len <= 128 : len >= 2; len = inv ? len * 2 : len / 2) begin
      int bank = c ^ (s % 2);
      for (int st = 0; st < 256; st += 2 * len) begin
        int z = k;
        k = inv ? k - 1 : k + 1;
        for (int j = st; j < st + len; j++) begin
          sched[t].rd = 1; sched[t].ra0 = j; sched[t].ra1 = j + len; sched[t].k = z;
          sched[t].src = 2 * p + bank;
          sched[t+5].w0 = 1; sched[t+5].w1 = 1; sched[t+5].wa0 = j; sched[t+5].wa1 = j + len;
          sched[t+5].dst = 2 * p + (1 - bank);
          t++;
        end
      end
      s++;
    end
  endfunction

  function automatic void build_pwm(int ca, int cb);
    clear();
    for (int m = 0; m < 128; m++) begin
      int t = 1 + 5 * m;
      sched[t].rd = 1; sched[t].ra0 = 2 * m; sched[t].ra1 = 2 * m + 1; sched[t].k = 64 + m / 2;
      sched[t].src = ca; sched[t].src2 = 2 + cb;
      sched[t+7].w1 = 1; sched[t+7].wa1 = 2 * m + 1; sched[t+7].dst = 1 - ca;
      sched[t+9].w0 = 1; sched[t+9].wa0 = 2 * m;     sched[t+9].dst = 1 - ca;
    end
  endfunction

  task automatic chk(input bit cond, input string what, input int t);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, t);
    end
  endtask

  task automatic run(input op_e o, input bit p, input int lat, input bit pwm);
    @(negedge clk);
    op = o; poly = p; start = 1;
    for (int t = 0; t <= lat; t++) begin
      if (t > 0) begin
        chk(rd_en == sched[t].rd, "rd_en", t);
        if (sched[t].rd) begin
          chk(rd_addr0 == caddr_t'(sched[t].ra0) && rd_addr1 == caddr_t'(sched[t].ra1), "read address", t);
          chk(int'(brom_addr) == sched[t].k && brom_en, "twiddle address", t);
          chk(int'(rd_src) == sched[t].src, "source BRAM", t);
          if (pwm) chk(rd_src2_en && int'(rd_src2) == sched[t].src2, "second source", t);
        end
        chk(wr_we0 == sched[t].w0 && wr_we1 == sched[t].w1, "write enables", t);
        if (sched[t].w0) chk(wr_addr0 == caddr_t'(sched[t].wa0) && int'(wr_dst) == sched[t].dst, "write port 0", t);
        if (sched[t].w1) chk(wr_addr1 == caddr_t'(sched[t].wa1) && int'(wr_dst) == sched[t].dst, "write port 1", t);
        chk(done == (t == lat), "done timing", t);
        chk(busy == (t < lat), "busy", t);
      end
      @(negedge clk);
      start = 0;
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    build_ntt(0, 0, 0);
    run(OP_NTT, 0, 906, 0);
    chk(cur == 2'b01 && post[0] == POST_BARRETT, "NTT bank swap / tag", 0);
    build_ntt(1, 1, 0);
    run(OP_INTT, 1, 906, 0);
    chk(cur == 2'b11 && post[1] == POST_MODMUL, "INTT bank swap / tag", 0);
    build_pwm(1, 1);
    run(OP_PWM, 0, 649, 1);
    chk(cur == 2'b10 && post[0] == POST_NONE, "PWM bank swap / tag", 0);
    @(negedge clk); load = 1; load_poly = 1;
    @(negedge clk); load = 0;
    chk(post[1] == POST_NONE, "load clears tag", 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
