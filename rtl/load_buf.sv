// load_buf: the Load_Buf stage of a PE. On `start` it issues one burst read
// of WORDS words of PORT_WIDTH bits from off-chip memory, starting at byte
// address `addr`, and writes the returned words, in order, to the tile
// buffer at word addresses 0..WORDS-1. The read data is accepted every
// cycle (r_ready stays high while a tile is loading), so a tile takes
// WORDS cycles plus the memory latency: the burst with II=1 of the
// document, whose consecutive access size is the whole tile (buf_size).
// `done` pulses one cycle after the last word is written.
// The request channel is a valid/ready pair (addr, len in words); the data
// channel carries valid/ready/data/last. This simple AXI-like protocol is
// this design's own; the document uses the memory ports of its HLS tool.
// An assertion checks that r_last comes with the last word and with no
// other; it is disabled during reset, which is why lint reports rst_n as
// used both asynchronously (the flops) and synchronously (the assertion).
module load_buf #(
  parameter int unsigned PORT_WIDTH = 512,
  parameter int unsigned WORDS      = 2048,   // words per tile
  parameter int unsigned ADDR_W     = 64,
  localparam int unsigned AW        = (WORDS <= 1) ? 1 : $clog2(WORDS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [ADDR_W-1:0]     addr,
  output logic                  done,
  // off-chip read port
  output logic                  ar_valid,
  input  logic                  ar_ready,
  output logic [ADDR_W-1:0]     ar_addr,
  output logic [31:0]           ar_len,
  input  logic                  r_valid,
  output logic                  r_ready,
  input  logic [PORT_WIDTH-1:0] r_data,
  input  logic                  r_last,
  // tile buffer write port
  output logic                  buf_we,
  output logic [AW-1:0]         buf_waddr,
  output logic [PORT_WIDTH-1:0] buf_wdata
);

  typedef enum logic [1:0] {L_IDLE, L_REQ, L_DATA} state_e;
  state_e        state;
  logic [AW-1:0] cnt;

  assign ar_valid  = (state == L_REQ);
  assign ar_len    = 32'(WORDS);
  assign r_ready   = (state == L_DATA);
  assign buf_we    = (state == L_DATA) && r_valid;
  assign buf_waddr = cnt;
  assign buf_wdata = r_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= L_IDLE;
      cnt     <= '0;
      ar_addr <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        L_IDLE: if (start) begin
          ar_addr <= addr;
          cnt     <= '0;
          state   <= L_REQ;
        end
        L_REQ: if (ar_ready) state <= L_DATA;
        L_DATA: if (r_valid) begin
          cnt <= cnt + 1'b1;
          if (cnt == AW'(WORDS - 1)) begin
            state <= L_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= L_IDLE;
      endcase
    end
  end

  // The memory marks the final beat; it must coincide with the last word.
  a_last_beat: assert property (@(posedge clk) disable iff (!rst_n)
    (state == L_DATA && r_valid) |-> (r_last == (cnt == AW'(WORDS - 1))));

endmodule
