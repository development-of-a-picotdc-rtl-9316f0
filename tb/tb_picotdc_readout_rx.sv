// tb_picotdc_readout_rx: a PicoTDC port model sends 32-bit frames, MSB
// byte first with sync on the first byte, mixed with idle frames
// (0xD0D0D0D0), gaps with sync low, and frames cut short by an early
// sync. The byte clock (125 MHz) is unrelated to the IPbus clock
// (40 MHz). The testbench reads the data register over IPbus and checks
// that exactly the non-idle complete frames come out, in order; that an
// empty FIFO reads as the idle word with status bit 0 set; and that when
// more frames arrive than fit (FIFO_DEPTH = 16 here) the first ones are
// kept in order and the overflow flag is set.
module tb_picotdc_readout_rx;
  import ipbus_pkg::*;
  localparam int DEPTH = 16;
  logic rx_clk = 0, clk = 0, rst = 1;
  logic [7:0] rx_data = 8'hD0;
  logic rx_sync = 0;
  ipb_wbus_t ipb_in = '{default: '0};
  ipb_rbus_t ipb_out;
  int checks = 0, failures = 0;
  logic [31:0] expq[$];

  picotdc_readout_rx #(.FIFO_DEPTH(DEPTH)) dut (
    .rx_clk, .rx_rst(rst), .rx_data, .rx_sync, .clk, .rst, .ipb_in, .ipb_out);

  always #4 rx_clk = ~rx_clk;
  always #12.5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // port model: bytes change on the falling edge of rx_clk
  task automatic send_frame(input logic [31:0] w, input int nb = 4);
    for (int i = 0; i < nb; i++) begin
      @(negedge rx_clk);
      rx_data = w[31 - 8*i -: 8];
      rx_sync = (i == 0);
    end
  endtask
  task automatic idle_gap(input int n);
    repeat (n) begin @(negedge rx_clk); rx_data = 8'hD0; rx_sync = 0; end
  endtask

  task automatic ipb_read(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk);
    ipb_in = '{addr: a, wdata: '0, write: 1'b0, strobe: 1'b1};
    #1 d = ipb_out.rdata;
    @(negedge clk);
    ipb_in = '{default: '0};
  endtask

  function automatic logic [31:0] rand_frame();
    logic [31:0] w = $urandom;
    if (w[31:28] == 4'hD) w[31:28] = 4'h5;
    return w;
  endfunction

  logic [31:0] d, got[$];
  initial begin
    repeat (4) @(posedge clk);
    rst = 0;
    repeat (6) @(posedge clk);
    ipb_read(1, d);
    check(d == 32'h1, $sformatf("status empty after reset (%h)", d));
    ipb_read(0, d);
    check(d == TDC_IDLE_WORD, "empty read gives the idle word");
    // traffic in bursts smaller than the FIFO, drained between bursts
    for (int burst = 0; burst < 20; burst++) begin
      for (int f = 0; f < 10; f++) begin
        int kind;
        logic [31:0] w;
        kind = $urandom_range(9);
        if (kind < 6) begin
          w = rand_frame();
          send_frame(w);
          expq.push_back(w);
        end else if (kind < 8) begin
          send_frame(TDC_IDLE_WORD);
        end else if (kind == 8) begin
          send_frame(rand_frame(), $urandom_range(1, 3));  // cut short by the next sync
          w = rand_frame();
          send_frame(w);
          expq.push_back(w);
        end else begin
          idle_gap($urandom_range(1, 7));
        end
      end
      idle_gap(8);
      repeat (4) @(posedge clk);
      forever begin
        ipb_read(1, d);
        if (d[0]) break;
        ipb_read(0, d);
        got.push_back(d);
      end
    end
    check(got.size() == expq.size(), $sformatf("got %0d frames, expected %0d", got.size(), expq.size()));
    for (int i = 0; i < got.size() && i < expq.size(); i++)
      check(got[i] == expq[i], $sformatf("frame %0d: %h expected %h", i, got[i], expq[i]));
    ipb_read(1, d);
    check(d[1] == 1'b0, "no overflow yet");
    // overflow: send far more than fits, then drain
    got.delete(); expq.delete();
    for (int f = 0; f < 3 * DEPTH; f++) begin
      logic [31:0] w;
      w = rand_frame();
      send_frame(w);
      expq.push_back(w);
    end
    idle_gap(8);
    repeat (6) @(posedge clk);
    ipb_read(1, d);
    check(d[1] == 1'b1, "overflow flag set");
    forever begin
      ipb_read(1, d);
      if (d[0]) break;
      ipb_read(0, d);
      got.push_back(d);
    end
    check(got.size() >= DEPTH && got.size() <= DEPTH + 2, $sformatf("%0d frames kept", got.size()));
    for (int i = 0; i < got.size(); i++)
      check(got[i] == expq[i], $sformatf("kept frame %0d: %h expected %h", i, got[i], expq[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
