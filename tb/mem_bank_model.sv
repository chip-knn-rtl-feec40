// mem_bank_model: behavioural model of one off-chip memory bank (a DDR4 or
// HBM2 channel) behind a simple burst read port. Not synthesizable logic;
// used by the testbenches only.
//
// A request (ar_valid/ar_ready, byte address, length in words) is accepted
// when the model is idle and out of reset. After LATENCY cycles it returns `len` words of
// PORT_WIDTH bits on r_valid/r_ready, the last marked by r_last. With
// GAP_PCT > 0 it randomly leaves cycles without data, imitating refresh and
// bank conflicts; `gaps` counts those cycles. Memory contents are not
// stored: float number n of the bank (byte address 4n) is
// tb_fp_pkg::gen_float(BANK, n).
module mem_bank_model
  import tb_fp_pkg::*;
#(
  parameter int unsigned PORT_WIDTH = 512,
  parameter int unsigned ADDR_W     = 64,
  parameter int unsigned BANK       = 0,
  parameter int unsigned LATENCY    = 8,
  parameter int unsigned GAP_PCT    = 0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ar_valid,
  output logic                  ar_ready,
  input  logic [ADDR_W-1:0]     ar_addr,
  input  logic [31:0]           ar_len,
  output logic                  r_valid,
  input  logic                  r_ready,
  output logic [PORT_WIDTH-1:0] r_data,
  output logic                  r_last,
  output int                    gaps
);

  localparam int unsigned LANES = PORT_WIDTH / 32;

  logic [ADDR_W-1:0] addr;
  int unsigned       left, wait_cnt;
  logic              active;

  initial begin
    active = 0; r_valid = 0; r_last = 0; r_data = '0; gaps = 0;
    left = 0; wait_cnt = 0; addr = '0;
  end

  assign ar_ready = !active;

  function automatic logic [PORT_WIDTH-1:0] word_at(logic [ADDR_W-1:0] a);
    logic [PORT_WIDTH-1:0] w;
    for (int l = 0; l < int'(LANES); l++)
      w[32*l +: 32] = gen_float(BANK, int'(a / 4) + l);
    return w;
  endfunction

  always @(posedge clk) begin
    if (!rst_n) begin
      active  <= 1'b0;
      r_valid <= 1'b0;
      r_last  <= 1'b0;
      left     = 0;
    end else if (r_valid && r_ready) begin
      r_valid <= 1'b0;
      r_last  <= 1'b0;
      addr     = addr + ADDR_W'(PORT_WIDTH / 8);
      left     = left - 1;
      if (left == 0) active <= 1'b0;
    end
    if (rst_n && !active && ar_valid) begin
      active   <= 1'b1;
      addr      = ar_addr;
      left      = ar_len;
      wait_cnt  = LATENCY;
    end else if (rst_n && active && left > 0 && !(r_valid && !r_ready)) begin
      if (wait_cnt > 0) begin
        wait_cnt = wait_cnt - 1;
      end else if (GAP_PCT > 0 && ($urandom % 100) < GAP_PCT) begin
        gaps    <= gaps + 1;
        r_valid <= 1'b0;
      end else begin
        r_valid <= 1'b1;
        r_data  <= word_at(addr);
        r_last  <= (left == 1);
      end
    end
  end

endmodule
