// tb_ipbus_fabric: random master cycles against slaves that answer with
// their own index. Checks that only the addressed slave sees the strobe,
// that its answer reaches the master, and that unmapped addresses (slave
// index too large, or upper address bits set) are answered with err.
module tb_ipbus_fabric;
  import ipbus_pkg::*;
  localparam int NSLV = N_SLAVES;
  ipb_wbus_t m_w;
  ipb_rbus_t m_r;
  ipb_wbus_t s_w [NSLV];
  ipb_rbus_t s_r [NSLV];
  int checks = 0, failures = 0;

  ipbus_fabric #(.NSLV(NSLV)) dut (.ipb_from_master(m_w), .ipb_to_master(m_r),
                                   .ipb_to_slaves(s_w), .ipb_from_slaves(s_r));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  always_comb
    for (int i = 0; i < NSLV; i++)
      s_r[i] = '{rdata: 32'hA0 + 32'(i) + {s_w[i].addr[7:0], 24'h0}, ack: s_w[i].strobe, err: 1'b0};

  initial begin
    for (int n = 0; n < 500; n++) begin
      int sel; bit mapped;
      m_w.addr   = (n % 5 == 0) ? $urandom : {20'h0, 4'($urandom % 9), 8'($urandom)};
      m_w.wdata  = $urandom;
      m_w.write  = 1'($urandom);
      m_w.strobe = 1'b1;
      #1;
      sel    = int'(m_w.addr[11:8]);
      mapped = (m_w.addr[31:12] == 0) && sel < NSLV;
      for (int i = 0; i < NSLV; i++) begin
        check(s_w[i].strobe == (mapped && sel == i), $sformatf("strobe of slave %0d for %h", i, m_w.addr));
        check(s_w[i].addr == m_w.addr && s_w[i].wdata == m_w.wdata && s_w[i].write == m_w.write, "fields passed");
      end
      if (mapped) check(m_r.ack && !m_r.err && m_r.rdata == 32'hA0 + 32'(sel) + {m_w.addr[7:0], 24'h0}, "answer of selected slave");
      else        check(m_r.err && !m_r.ack, $sformatf("err for unmapped %h", m_w.addr));
      m_w.strobe = 1'b0;
      #1;
      check(!m_r.ack && !m_r.err, "quiet without strobe");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
