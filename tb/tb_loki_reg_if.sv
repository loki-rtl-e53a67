// tb_loki_reg_if: self-checking testbench of the register interface.
// The two engines are replaced by small models: the polynomial core answers
// a coefficient read two cycles later with a value derived from the address,
// the Keccak core shows a lane value derived from the lane index. Checked:
// decoding of start/op/polynomial, coefficient loads (polynomial, index,
// data), coefficient reads and their wait states, lane writes (index, half)
// and reads of both halves, the status registers with their sticky done
// bits, and error responses for unmapped addresses and for accesses while an
// engine is busy.
module tb_loki_reg_if;
  import loki_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  reg_req_t req = '0;
  reg_rsp_t rsp;
  logic ntt_start, ntt_poly, ntt_load, ntt_read, ntt_cpoly;
  op_e ntt_op;
  caddr_t ntt_caddr;
  coef_t ntt_din, ntt_dout;
  logic ntt_busy = 0, ntt_done = 0, ntt_dvalid;
  logic kec_start, kec_we, kec_busy = 0, kec_done = 0;
  logic [1:0] kec_half;
  logic [4:0] kec_idx;
  logic [63:0] kec_wdata, kec_rdata;
  int checks = 0, failures = 0;

  loki_reg_if dut (
    .clk_i(clk), .rst_ni(rst_n), .reg_req_i(req), .reg_rsp_o(rsp),
    .ntt_start_o(ntt_start), .ntt_op_o(ntt_op), .ntt_poly_o(ntt_poly),
    .ntt_busy_i(ntt_busy), .ntt_done_i(ntt_done), .ntt_load_o(ntt_load),
    .ntt_read_o(ntt_read), .ntt_cpoly_o(ntt_cpoly), .ntt_caddr_o(ntt_caddr),
    .ntt_din_o(ntt_din), .ntt_dout_i(ntt_dout), .ntt_dvalid_i(ntt_dvalid),
    .kec_start_o(kec_start), .kec_busy_i(kec_busy), .kec_done_i(kec_done),
    .kec_we_o(kec_we), .kec_half_o(kec_half), .kec_idx_o(kec_idx),
    .kec_wdata_o(kec_wdata), .kec_rdata_i(kec_rdata)
  );

  // core read model: two-cycle latency
  logic [1:0] vpipe = '0;
  coef_t dpipe [2];
  always @(posedge clk) begin
    vpipe <= {vpipe[0], ntt_read};
    dpipe[0] <= coef_t'({ntt_cpoly, ntt_caddr} * 7 + 1);
    dpipe[1] <= dpipe[0];
  end
  assign ntt_dvalid = vpipe[1];
  assign ntt_dout   = dpipe[1];
  assign kec_rdata  = {27'h0, kec_idx, 27'h1, kec_idx};

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // one bus access; also returns the number of wait cycles and what the
  // decoded strobes looked like in the accepting cycle
  logic s_start, s_load, s_kwe;
  op_e  s_op;
  logic s_poly, s_cpoly;
  caddr_t s_caddr;
  coef_t s_din;
  logic [1:0] s_half;
  logic [4:0] s_idx;
  logic s_kstart;
  logic [63:0] s_kwdata;

  task automatic bus(input logic wr, input logic [31:0] addr, input logic [31:0] wd,
                     output logic [31:0] rd, output logic err, output int waits);
    waits = 0;
    @(negedge clk);
    req = '{addr: addr, write: wr, wdata: wd, wstrb: 4'hF, valid: 1'b1};
    forever begin
      #1;
      if (rsp.ready) break;
      waits++;
      @(negedge clk);
    end
    rd = rsp.rdata; err = rsp.error;
    s_start = ntt_start; s_op = ntt_op; s_poly = ntt_poly; s_load = ntt_load;
    s_cpoly = ntt_cpoly; s_caddr = ntt_caddr; s_din = ntt_din;
    s_kwe = kec_we; s_half = kec_half; s_idx = kec_idx;
    s_kstart = kec_start; s_kwdata = kec_wdata;
    @(posedge clk);
    #1;
    req = '0;
  endtask

  logic [31:0] d; logic e; int w;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;

    bus(1, 32'h0, 32'b1011, d, e, w);   // start INTT on B
    chk(!e && s_start && s_op == OP_INTT && s_poly, "start decode");
    bus(0, 32'h0, 0, d, e, w);
    chk(d[3:0] == 4'b1010, "ctrl read-back");
    bus(1, 32'h0, 32'b0100, d, e, w);   // PWM fields, no start bit
    chk(!s_start, "no start without bit 0");

    bus(1, 32'h800 + 4 * 37, 32'd3000, d, e, w);
    chk(!e && s_load && s_cpoly && s_caddr == 8'd37 && s_din == 12'd3000, "load decode");
    bus(0, 32'h400 + 4 * 200, 0, d, e, w);
    chk(!e && w == 2 && d == 32'(coef_t'(200 * 7 + 1)), "coefficient read A");
    bus(0, 32'h800 + 4 * 5, 0, d, e, w);
    chk(!e && w == 2 && d == 32'(coef_t'((256 + 5) * 7 + 1)), "coefficient read B");

    // busy core: coefficient access refused, status shows busy
    ntt_busy = 1;
    bus(0, 32'h400, 0, d, e, w);
    chk(e && w == 0, "read while busy -> error");
    bus(1, 32'h400, 0, d, e, w);
    chk(e && !s_load, "load while busy -> error");
    bus(0, 32'h4, 0, d, e, w);
    chk(d[1:0] == 2'b01, "status busy");
    @(negedge clk); ntt_busy = 0; ntt_done = 1;
    @(negedge clk); ntt_done = 0;
    bus(0, 32'h4, 0, d, e, w);
    chk(d[1:0] == 2'b10, "status done sticky");
    bus(1, 32'h0, 32'b0001, d, e, w);
    bus(0, 32'h4, 0, d, e, w);
    chk(d[1] == 1'b0, "done cleared by start");

    // Keccak lanes and control
    bus(1, 32'h1000 + 8 * 7 + 4, 32'hDEADBEEF, d, e, w);
    chk(!e && s_kwe && s_idx == 5'd7 && s_half == 2'b10 && s_kwdata[63:32] == 32'hDEADBEEF, "lane high write");
    bus(1, 32'h1000 + 8 * 24, 32'h12345678, d, e, w);
    chk(!e && s_kwe && s_idx == 5'd24 && s_half == 2'b01, "lane low write");
    bus(0, 32'h1000 + 8 * 9, 0, d, e, w);
    chk(!e && d == {27'h1, 5'd9}, "lane low read");
    bus(0, 32'h1000 + 8 * 9 + 4, 0, d, e, w);
    chk(!e && d == {27'h0, 5'd9}, "lane high read");
    bus(0, 32'h1000 + 8 * 25, 0, d, e, w);
    chk(e, "lane 25 unmapped");
    kec_busy = 1;
    bus(1, 32'h1000, 0, d, e, w);
    chk(e && !s_kwe, "lane write while busy -> error");
    bus(0, 32'h1104, 0, d, e, w);
    chk(d[1:0] == 2'b01, "keccak status busy");
    @(negedge clk); kec_busy = 0; kec_done = 1;
    @(negedge clk); kec_done = 0;
    bus(0, 32'h1104, 0, d, e, w);
    chk(d[1:0] == 2'b10, "keccak done sticky");
    bus(1, 32'h1100, 1, d, e, w);
    chk(!e && s_kstart, "keccak start");
    #1;
    chk(kec_start == 1'b0, "keccak start is a strobe");
    bus(0, 32'h3000, 0, d, e, w);
    chk(e, "unmapped address");
    bus(0, 32'h0001_0400, 0, d, e, w);
    chk(e, "upper address bits decoded");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
