// tb_csr_registers: self-checking test of the control/status registers.
//
// A reference model in the testbench tracks ECC_EN, ECC_INJ and ECC_STATUS.
// Random APB-style accesses (random psel/penable/pwrite, addresses biased to
// the two registers, random byte strobes), random error events, status-clear
// pulses and software resets are applied; after every clock all outputs are
// compared with the model, including the saturating corrected-error counter
// (driven past 255) and the interrupt.
module tb_csr_registers;
  import zmc_pkg::*;

  logic        clk = 1'b0, rstn = 1'b0, sw_rst, psel, penable, pwrite, clr, ce, ue;
  word_t       pwdata, ecc_inj, status;
  logic [9:0]  paddr;
  strb_t       pstrb;
  logic [13:0] err_addr;
  logic        ecc_en, irq;
  int          checks = 0, failures = 0;

  csr_registers dut (
    .clk(clk), .rstn(rstn), .sw_rst(sw_rst), .i_psel(psel), .i_penable(penable),
    .i_pwrite(pwrite), .i_pwdata(pwdata), .i_paddr(paddr), .i_pstrb(pstrb),
    .i_ecc_status_clear(clr), .ce_event(ce), .ue_event(ue), .err_addr(err_addr),
    .o_ecc_en(ecc_en), .o_ecc_inj(ecc_inj), .o_ecc_status(status), .o_ecc_interrupt(irq));

  always #5 clk = ~clk;

  // reference model
  bit          m_en;
  word_t       m_inj;
  bit          m_ce, m_ue;
  int          m_cnt;
  logic [13:0] m_addr;

  task automatic model_reset();
    m_en = 1'b1; m_inj = '0; m_ce = 1'b0; m_ue = 1'b0; m_cnt = 0; m_addr = '0;
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s at %0t en=%b inj=%h status=%h irq=%b", what, $time, ecc_en, ecc_inj, status, irq);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t m_status;
    sw_rst = 0; psel = 0; penable = 0; pwrite = 0; clr = 0; ce = 0; ue = 0;
    pwdata = '0; paddr = '0; pstrb = '0; err_addr = '0;
    model_reset();
    @(negedge clk);
    rstn = 1'b1;
    for (int n = 0; n < 6000; n++) begin
      bit phase_ce;
      phase_ce = (n >= 2000 && n < 3000);   // long error burst: counter saturates
      psel    = 1'($urandom_range(1));
      penable = 1'($urandom_range(1));
      pwrite  = 1'($urandom_range(1));
      paddr   = ($urandom_range(3) == 0) ? 10'($urandom) : (($urandom_range(1) != 0) ? 10'h000 : 10'h004);
      pwdata  = $urandom;
      pstrb   = 4'($urandom);
      ce      = phase_ce ? 1'b1 : ($urandom_range(15) == 0);
      ue      = ($urandom_range(31) == 0);
      err_addr = 14'($urandom);
      clr     = phase_ce ? 1'b0 : ($urandom_range(63) == 0);
      sw_rst  = phase_ce ? 1'b0 : ($urandom_range(499) == 0);
      @(posedge clk);
      if (sw_rst) model_reset();
      else begin
        if (psel && penable && pwrite) begin
          if (paddr == 10'h000 && pstrb[0]) m_en = pwdata[0];
          if (paddr == 10'h004)
            for (int b = 0; b < 4; b++) if (pstrb[b]) m_inj[8*b +: 8] = pwdata[8*b +: 8];
        end
        if (clr) begin
          m_ce = 0; m_ue = 0; m_cnt = 0; m_addr = '0;
        end else if (ce || ue) begin
          if (ce) begin m_ce = 1; if (m_cnt < 255) m_cnt++; end
          if (ue) m_ue = 1;
          m_addr = err_addr;
        end
      end
      @(negedge clk);
      m_status = '0;
      m_status[0] = m_ce; m_status[1] = m_ue; m_status[15:8] = 8'(m_cnt); m_status[29:16] = m_addr;
      check(ecc_en == m_en, "ecc_en");
      check(ecc_inj == m_inj, "ecc_inj");
      check(status == m_status, "status");
      check(irq == (m_ce | m_ue), "interrupt");
      if (n == 2999) check(m_cnt == 255 && status[15:8] == 8'hFF, "counter saturated");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
