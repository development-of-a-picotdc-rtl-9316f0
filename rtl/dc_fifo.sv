// dc_fifo: dual-clock FIFO with first-word-fall-through output.
//
// Used for the two buffers between the FTDI clock domain (100 MHz, logic on
// the falling edge, fed here as an inverted clock) and the IPbus clock
// domain (40 MHz): InBuff (1024 x 32, commands from the host) and OutBuff
// (65536 x 32, replies and read-out data to the host).
//
// How it works: a RAM of DEPTH words is written at wr_clk. Binary read and
// write pointers one bit wider than the address are kept in Gray code and
// passed through two-flop synchronisers into the other domain, where full
// (write side) and empty (read side) are computed. On the read side a single
// output register is refilled from the RAM whenever it is empty or being
// read, so the oldest word is on rd_data whenever rd_empty is low and a
// read (rd_en) takes it in the same cycle. This gives both the
// first-word-fall-through behaviour of InBuff and the single-cycle first
// read of OutBuff; the capacity is DEPTH + 1 words.
//
// Interface: wr_en is ignored while wr_full, rd_en while rd_empty. Each
// side has its own active-high synchronous reset; the two resets must
// overlap by a few cycles of the slower clock.
// Latency: a written word is visible on the read side 3 to 4 rd_clk cycles
// later (two synchroniser flops plus the output register).
module dc_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 1024          // power of two
) (
  input  logic             wr_clk,
  input  logic             wr_rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             wr_full,

  input  logic             rd_clk,
  input  logic             rd_rst,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             rd_empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write side ----------------
  logic [AW:0] rptr_bin, rptr_gray_r;
  logic [AW:0] wptr_gray_r1, wptr_gray_r2;
  logic [AW:0] wptr_bin, wptr_gray;
  logic [AW:0] rptr_gray_w1, rptr_gray_w2;
  logic [AW:0] rptr_bin_w;

  assign rptr_bin_w = gray2bin(rptr_gray_w2);
  assign wr_full    = (wptr_bin[AW] != rptr_bin_w[AW]) &&
                      (wptr_bin[AW-1:0] == rptr_bin_w[AW-1:0]);

  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      wptr_bin     <= '0;
      wptr_gray    <= '0;
      rptr_gray_w1 <= '0;
      rptr_gray_w2 <= '0;
    end else begin
      rptr_gray_w1 <= rptr_gray_r;
      rptr_gray_w2 <= rptr_gray_w1;
      if (wr_en && !wr_full) begin
        wptr_bin  <= wptr_bin + 1'b1;
        wptr_gray <= bin2gray(wptr_bin + 1'b1);
      end
    end
  end

  always_ff @(posedge wr_clk) begin
    if (wr_en && !wr_full) mem[wptr_bin[AW-1:0]] <= wr_data;
  end

  // ---------------- read side ----------------
  logic        ram_empty;
  logic        out_valid;
  logic        load;

  assign ram_empty = (rptr_gray_r == wptr_gray_r2);
  assign rd_empty  = !out_valid;
  assign load      = !ram_empty && (!out_valid || rd_en);

  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      rptr_bin     <= '0;
      rptr_gray_r  <= '0;
      wptr_gray_r1 <= '0;
      wptr_gray_r2 <= '0;
      out_valid    <= 1'b0;
    end else begin
      wptr_gray_r1 <= wptr_gray;
      wptr_gray_r2 <= wptr_gray_r1;
      if (load) begin
        rptr_bin    <= rptr_bin + 1'b1;
        rptr_gray_r <= bin2gray(rptr_bin + 1'b1);
        out_valid   <= 1'b1;
      end else if (rd_en) begin
        out_valid   <= 1'b0;
      end
    end
  end

  always_ff @(posedge rd_clk) begin
    if (load) rd_data <= mem[rptr_bin[AW-1:0]];
  end

endmodule
