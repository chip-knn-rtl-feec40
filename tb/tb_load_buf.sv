// tb_load_buf: self-checking test of load_buf against the memory model.
// Instance A uses the default sizes (2048 words of 512 bits, one 128 KB
// tile) on a memory without gaps: every word must arrive at the right buffer
// address and a tile must take WORDS cycles plus the memory latency plus at
// most 4 cycles (II=1). Instance B (64 words of 128 bits) sees a memory that
// leaves random gaps; its data must still be complete and in order.
module tb_load_buf;
  import tb_fp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int PWA = 512, WA = 2048, PWB = 128, WB = 64, LAT = 8;

  // ---- instance A
  logic            start_a, done_a, arv_a, arr_a, rv_a, rr_a, rl_a, we_a;
  logic [63:0]     ara_a;
  logic [31:0]     arl_a;
  logic [PWA-1:0]  rd_a, wd_a;
  logic [10:0]     wa_a;
  int              gaps_a;
  logic [PWA-1:0]  buf_a [WA];

  load_buf #(.PORT_WIDTH(PWA), .WORDS(WA)) dut_a (
    .clk, .rst_n, .start(start_a), .addr(64'h0002_0000), .done(done_a),
    .ar_valid(arv_a), .ar_ready(arr_a), .ar_addr(ara_a), .ar_len(arl_a),
    .r_valid(rv_a), .r_ready(rr_a), .r_data(rd_a), .r_last(rl_a),
    .buf_we(we_a), .buf_waddr(wa_a), .buf_wdata(wd_a));
  mem_bank_model #(.PORT_WIDTH(PWA), .BANK(3), .LATENCY(LAT)) mem_a (
    .clk, .rst_n, .ar_valid(arv_a), .ar_ready(arr_a), .ar_addr(ara_a), .ar_len(arl_a),
    .r_valid(rv_a), .r_ready(rr_a), .r_data(rd_a), .r_last(rl_a), .gaps(gaps_a));
  always @(posedge clk) if (we_a) buf_a[wa_a] <= wd_a;

  // ---- instance B
  logic            start_b, done_b, arv_b, arr_b, rv_b, rr_b, rl_b, we_b;
  logic [63:0]     ara_b;
  logic [31:0]     arl_b;
  logic [PWB-1:0]  rd_b, wd_b;
  logic [5:0]      wa_b;
  int              gaps_b;
  logic [PWB-1:0]  buf_b [WB];

  load_buf #(.PORT_WIDTH(PWB), .WORDS(WB)) dut_b (
    .clk, .rst_n, .start(start_b), .addr(64'h400), .done(done_b),
    .ar_valid(arv_b), .ar_ready(arr_b), .ar_addr(ara_b), .ar_len(arl_b),
    .r_valid(rv_b), .r_ready(rr_b), .r_data(rd_b), .r_last(rl_b),
    .buf_we(we_b), .buf_waddr(wa_b), .buf_wdata(wd_b));
  mem_bank_model #(.PORT_WIDTH(PWB), .BANK(5), .LATENCY(3), .GAP_PCT(25)) mem_b (
    .clk, .rst_n, .ar_valid(arv_b), .ar_ready(arr_b), .ar_addr(ara_b), .ar_len(arl_b),
    .r_valid(rv_b), .r_ready(rr_b), .r_data(rd_b), .r_last(rl_b), .gaps(gaps_b));
  always @(posedge clk) if (we_b) buf_b[wa_b] <= wd_b;

  function automatic logic [PWA-1:0] exp_a(int w);
    logic [PWA-1:0] v;
    for (int l = 0; l < PWA / 32; l++) v[32*l +: 32] = gen_float(3, (32'h2_0000 + w * PWA / 8) / 4 + l);
    return v;
  endfunction
  function automatic logic [PWB-1:0] exp_b(int w);
    logic [PWB-1:0] v;
    for (int l = 0; l < PWB / 32; l++) v[32*l +: 32] = gen_float(5, (32'h400 + w * PWB / 8) / 4 + l);
    return v;
  endfunction

  initial begin
    int t0, ta, tb;
    start_a = 0; start_b = 0;
    for (int i = 0; i < WA; i++) buf_a[i] = '0;
    for (int i = 0; i < WB; i++) buf_b[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1 start_a = 1; start_b = 1;
    @(posedge clk); #1 start_a = 0; start_b = 0;
    t0 = $time / 10; ta = -1; tb = -1;
    while ((ta < 0 || tb < 0) && $time / 10 - t0 < 10000) begin
      @(posedge clk); #1;
      if (done_a) ta = $time / 10 - t0;
      if (done_b) tb = $time / 10 - t0;
    end
    @(posedge clk); #1;
    for (int i = 0; i < WA; i++) begin
      checks++;
      if (buf_a[i] !== exp_a(i)) begin
        failures++;
        if (failures < 10) $display("A word %0d wrong", i);
      end
    end
    for (int i = 0; i < WB; i++) begin
      checks++;
      if (buf_b[i] !== exp_b(i)) begin
        failures++;
        if (failures < 10) $display("B word %0d wrong", i);
      end
    end
    $display("tile load: A %0d cycles, B %0d cycles with %0d memory gaps", ta, tb, gaps_b);
    checks++;
    if (ta < WA || ta > WA + LAT + 4) begin failures++; $display("A latency %0d", ta); end
    checks++;
    if (tb < WB + gaps_b || gaps_b == 0) begin failures++; $display("B gaps not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
