// liroc_analog_setup: IPbus slave that programs the 128-bit analog-probe
// shift registers of the two LIROC front-end chips (A and B) and reads back
// which probe point is enabled.
//
// Registers (address bits [1:0]):
//   0 setup     [6:0] probe position for LIROC A, [14:8] for LIROC B,
//               [30] start A, [31] start B. A start bit launches the
//               procedure for that chip (both may run together); it reads
//               back as 1 until the procedure has finished.
//   1 readback A [6:0], read-only
//   2 readback B [6:0], read-only
//
// Procedure. The shift-register clock must not exceed 1 MHz, so an
// internal 2**DIV_BITS divider (625 kHz from 40 MHz) paces everything. The
// FSM asserts sr_rst of the selected chips for two divided clock periods,
// then releases it and gates the divided clock to the selected chips for
// 256 periods. During periods 0..127 srin carries a single 1, placed so
// that after 128 rising edges it sits at the requested position; the
// chip samples srin on the rising edge. During periods 128..255 the same
// sequence is sent again, so the register keeps its contents, while the
// old contents come out on srout (changed by the chip on the falling edge,
// sampled here just before the next rising edge). When a 1 is seen, the
// position it came from is written to the readback register. Readback is
// cleared to 0 at the start of a procedure.
//
// Position convention (this design's choice): the 1 is sent as bit number
// 127 - p, so after 128 clocks it sits in stage p, where stage 0 is the
// stage next to srin and stage 127 the one driving srout. sr_clk is a
// registered copy of the gated divided clock (no glitches); srin changes
// half a period before each rising edge. Zero-wait slave. Synchronous
// reset.
module liroc_analog_setup
  import ipbus_pkg::*;
#(
  parameter int unsigned DIV_BITS = 6,
  parameter int unsigned SR_LEN   = 128
) (
  input  logic       clk,
  input  logic       rst,
  input  ipb_wbus_t  ipb_in,
  output ipb_rbus_t  ipb_out,
  // to LIROC A (index 0) and LIROC B (index 1)
  output logic [1:0] sr_clk,
  output logic [1:0] sr_rst,
  output logic [1:0] srin,
  input  logic [1:0] srout
);
  localparam int unsigned PW = $clog2(SR_LEN);

  typedef enum logic [1:0] {S_IDLE, S_RST, S_SHIFT} state_e;
  state_e state;

  logic [PW-1:0] pos [2];
  logic [PW-1:0] rb  [2];
  logic [1:0]    start_req, sel;
  logic [PW:0]   k;            // bit number 0 .. 2*SR_LEN-1
  logic [1:0]    rst_cnt;
  logic          clk_en;
  logic [1:0]    srout_s1, srout_s2;

  logic dclk, rise_tick, fall_tick;
  clk_divider #(.DIV_BITS(DIV_BITS)) u_div (
    .clk, .rst, .clk_out(dclk), .rise_tick, .fall_tick
  );

  logic wr;
  assign wr = ipb_in.strobe && ipb_in.write && (ipb_in.addr[1:0] == 2'd0);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      pos[0]    <= '0;
      pos[1]    <= '0;
      rb[0]     <= '0;
      rb[1]     <= '0;
      start_req <= '0;
      sel       <= '0;
      k         <= '0;
      rst_cnt   <= '0;
      clk_en    <= 1'b0;
      srout_s1  <= '0;
      srout_s2  <= '0;
      sr_clk    <= '0;
    end else begin
      for (int c = 0; c < 2; c++) sr_clk[c] <= sel[c] && clk_en && dclk;
      srout_s1 <= srout;
      srout_s2 <= srout_s1;
      if (wr) begin
        pos[0]    <= ipb_in.wdata[PW-1:0];
        pos[1]    <= ipb_in.wdata[8 +: PW];
        start_req <= start_req | ipb_in.wdata[31:30];
      end
      unique case (state)
        S_IDLE: begin
          if (start_req != 2'b00 && !wr) begin
            sel       <= start_req;
            start_req <= '0;
            if (start_req[0]) rb[0] <= '0;
            if (start_req[1]) rb[1] <= '0;
            rst_cnt   <= '0;
            state     <= S_RST;
          end
        end
        S_RST: if (fall_tick) begin
          rst_cnt <= rst_cnt + 1'b1;
          if (rst_cnt == 2'd2) begin
            clk_en <= 1'b1;
            k      <= '0;
            state  <= S_SHIFT;
          end
        end
        S_SHIFT: begin
          if (rise_tick && k[PW]) begin
            for (int c = 0; c < 2; c++)
              if (sel[c] && srout_s2[c]) rb[c] <= PW'(SR_LEN - 1) - k[PW-1:0];
          end
          if (fall_tick) begin
            if (k == (PW+1)'(2*SR_LEN - 1)) begin
              clk_en <= 1'b0;
              sel    <= '0;
              state  <= S_IDLE;
            end else begin
              k <= k + 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    for (int c = 0; c < 2; c++) begin
      sr_rst[c] = sel[c] && (state == S_RST);
      srin[c]   = sel[c] && clk_en && (k[PW-1:0] == PW'(SR_LEN - 1) - pos[c]);
    end
  end

  always_comb begin
    ipb_out = '{rdata: '0, ack: ipb_in.strobe, err: 1'b0};
    unique case (ipb_in.addr[1:0])
      2'd0: ipb_out.rdata = {start_req | sel, 14'd0, 8'(pos[1]), 8'(pos[0])};
      2'd1: ipb_out.rdata = 32'(rb[0]);
      2'd2: ipb_out.rdata = 32'(rb[1]);
      default: ipb_out.rdata = '0;
    endcase
  end

endmodule
