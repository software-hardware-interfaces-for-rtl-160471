// tb_pci_actel: self-checking test of the PCI Actel's NP registers.
// Reads the Transaction Status register for all four combinations of Flash
// busy and IEM ID, checks that the steered 1PPS sets INT[2] only on its rising
// edge and that register 0xA acknowledges it, that the PCI buffer event sets
// INT[5-2] and register 0x8 acknowledges it, that neither acknowledge clears
// the other interrupt, and that an event in the acknowledge clock wins.
// A final random phase drives every register offset, the 1PPS, the buffer
// event, the status inputs and the master reset at random and compares the
// outputs in every clock with a reference model.
module tb_pci_actel;
  import gns_pkg::*;
  logic        clk = 0, por_n = 1, master_rst = 0;
  logic        np_wr = 0, np_rd = 0;
  logic [3:0]  np_off = '0;
  logic [15:0] np_rdata;
  logic        flash_busy = 0, iem_id = 0, gta_pps = 0, pcibuf_evt = 0;
  logic        np_int_pps, np_int_pcibuf;
  int checks = 0, failures = 0;

  pci_actel dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask
  task automatic np_w(input logic [3:0] off);
    @(negedge clk); np_wr = 1; np_off = off;
    @(negedge clk); np_wr = 0;
  endtask
  task automatic np_r(input logic [3:0] off, output logic [15:0] d);
    @(negedge clk); np_rd = 1; np_off = off;
    @(negedge clk); np_rd = 0; d = np_rdata;
  endtask

  logic [15:0] d;

  // reference model: state after each clock edge
  bit          m_on = 0;
  logic        m_pps_q, m_pps, m_buf;
  logic [15:0] m_rdata;
  always @(posedge clk) if (m_on) begin
    m_pps_q <= gta_pps;
    if (master_rst) begin m_pps <= 0; m_buf <= 0; end
    else begin
      if (gta_pps && !m_pps_q) m_pps <= 1; else if (np_wr && np_off == 4'hA) m_pps <= 0;
      if (pcibuf_evt) m_buf <= 1; else if (np_wr && np_off == 4'h8) m_buf <= 0;
    end
    if (np_rd) m_rdata <= (np_off == 4'h6) ? {9'b0, iem_id, flash_busy, 5'b0} : 16'h0;
  end

  initial begin
    #1 por_n = 0;
    repeat (2) @(negedge clk);
    por_n = 1;
    chk(!np_int_pps && !np_int_pcibuf, "no interrupt after reset");
    for (int i = 0; i < 4; i++) begin
      flash_busy = i[0]; iem_id = i[1];
      np_r(PA_TRANS_STATUS, d);
      chk(d == 16'(i << 5), $sformatf("status %h for busy=%0d id=%0d", d, i[0], i[1]));
    end
    np_r(4'h0, d);
    chk(d == 16'h0, "unused register reads 0");

    // steered 1PPS: held high for several clocks sets INT[2] once
    @(negedge clk) gta_pps = 1;
    @(negedge clk);
    chk(np_int_pps, "1PPS rising edge sets INT[2]");
    chk(!np_int_pcibuf, "1PPS does not set INT[5-2]");
    repeat (3) @(negedge clk);
    np_w(PA_PCIBUF_ACK);
    chk(np_int_pps, "PCI buffer acknowledge leaves INT[2]");
    np_w(PA_PPS_ACK);
    chk(!np_int_pps, "register 0xA acknowledges INT[2]");
    repeat (3) @(negedge clk);
    chk(!np_int_pps, "a held 1PPS level does not set INT[2] again");
    gta_pps = 0; repeat (2) @(negedge clk);
    gta_pps = 1; @(negedge clk); gta_pps = 0; @(negedge clk);
    chk(np_int_pps, "next 1PPS sets INT[2] again");
    np_w(PA_PPS_ACK);

    // PCI buffer event
    @(negedge clk) pcibuf_evt = 1; @(negedge clk) pcibuf_evt = 0;
    chk(np_int_pcibuf, "buffer event sets INT[5-2]");
    np_w(PA_PPS_ACK);
    chk(np_int_pcibuf, "1PPS acknowledge leaves INT[5-2]");
    np_w(PA_PCIBUF_ACK);
    chk(!np_int_pcibuf, "register 0x8 acknowledges INT[5-2]");

    // event in the same clock as the acknowledge wins
    @(negedge clk); np_wr = 1; np_off = PA_PCIBUF_ACK; pcibuf_evt = 1;
    @(negedge clk); np_wr = 0; pcibuf_evt = 0;
    chk(np_int_pcibuf, "event in the acknowledge clock is kept");
    np_w(PA_PCIBUF_ACK);

    // master reset clears both
    @(negedge clk) pcibuf_evt = 1; gta_pps = 1;
    @(negedge clk) pcibuf_evt = 0; master_rst = 1;
    @(negedge clk) master_rst = 0;
    chk(!np_int_pps && !np_int_pcibuf, "master reset clears both interrupts");

    // random traffic against the reference model
    @(negedge clk);
    m_pps_q = gta_pps; m_pps = np_int_pps; m_buf = np_int_pcibuf; m_rdata = np_rdata;
    m_on = 1;
    for (int i = 0; i < 8000; i++) begin
      np_wr = 0; np_rd = 0;
      np_off = 4'($urandom);
      if ($urandom % 4 == 0) np_off = ($urandom % 2) ? 4'h8 : 4'hA;
      case ($urandom % 3) 0: np_wr = 1; 1: np_rd = 1; default: ; endcase
      if ($urandom % 7 == 0) gta_pps = !gta_pps;
      pcibuf_evt = ($urandom % 9) == 0;
      master_rst = ($urandom % 200) == 0;
      if ($urandom % 50 == 0) flash_busy = !flash_busy;
      if ($urandom % 300 == 0) iem_id = !iem_id;
      @(negedge clk);
      chk(np_int_pps === m_pps && np_int_pcibuf === m_buf && np_rdata === m_rdata,
          $sformatf("random cycle %0d: pps %b/%b buf %b/%b rdata %h/%h", i,
                    np_int_pps, m_pps, np_int_pcibuf, m_buf, np_rdata, m_rdata));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
