// tb_tp_addr_decode: self-checking test of the tracking processor address
// decoder against the TP memory map, entered by hand: window edges, just
// outside them, rollover and the ignored top three address bits. Then
// 20000 random addresses around every window edge are compared with a
// reference that states the map as plain address ranges.
module tb_tp_addr_decode;
  import gns_pkg::*;
  logic [31:0] addr;
  logic        valid;
  dev_e        dev;
  logic        dram_err;
  int checks = 0, failures = 0;

  tp_addr_decode dut (.addr, .valid, .dev, .dram_err);

  task automatic expect_dev(input logic [31:0] a, input dev_e d);
    addr = a; valid = 1'b1;
    #1;
    checks++;
    if (dev !== d || dram_err !== (d == DEV_DRAM)) begin
      failures++;
      $display("FAIL addr=%h dev=%s expected %s dram_err=%b", a, dev.name(), d.name(), dram_err);
    end
  endtask

  // reference: the memory map as address ranges of the physical address
  // (top three bits cleared), with the undecoded bits folded into the range
  function automatic dev_e ref_dev(input logic [31:0] addr_in);
    logic [31:0] p;
    p = addr_in & 32'h1FFF_FFFF;
    if (p <= 32'h0FFF_FFFF)                          return DEV_DRAM;
    if (p >= 32'h1000_0000 && p <= 32'h17FF_FFFF)    return DEV_SRAM;
    if (p >= 32'h1C20_0000 && p <= 32'h1C20_FFFF)    return DEV_RST_ACTEL;
    if (p >= 32'h1D30_0000 && p <= 32'h1D37_FFFF)    return DEV_GTA;
    if (p >= 32'h1FC0_0000 && p <= 32'h1FC0_1FFF)    return DEV_NPTP_BUF;
    return DEV_NONE;
  endfunction
  localparam logic [31:0] BASES [11] = '{32'h0000_0000, 32'h1000_0000, 32'h1800_0000, 32'h1C20_0000, 32'h1C21_0000, 32'h1D30_0000, 32'h1D38_0000, 32'h1D34_0000, 32'h1FC0_0000, 32'h1FC0_2000, 32'h0FFF_FFFC};

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expect_dev(32'h0000_0000, DEV_DRAM);
    expect_dev(32'h0ABC_0000, DEV_DRAM);
    expect_dev(32'h1000_0000, DEV_SRAM);
    expect_dev(32'h101F_FFFC, DEV_SRAM);
    expect_dev(32'h1040_0000, DEV_SRAM);      // rollover
    expect_dev(32'h1C20_0000, DEV_RST_ACTEL);
    expect_dev(32'h1C20_0004, DEV_RST_ACTEL);
    expect_dev(32'h1C10_0000, DEV_NONE);      // NP page is not visible to the TP
    expect_dev(32'h1D30_0000, DEV_GTA);
    expect_dev(32'h1D30_019E, DEV_GTA);
    expect_dev(32'h1D37_FFFE, DEV_GTA);
    expect_dev(32'h1D38_0000, DEV_NONE);
    expect_dev(32'h1D2F_FFFE, DEV_NONE);
    expect_dev(32'h1FC0_0000, DEV_NPTP_BUF);
    expect_dev(32'hBFC0_0000, DEV_NPTP_BUF);  // TP reset vector -> boot code
    expect_dev(32'h1FC0_1FFE, DEV_NPTP_BUF);
    expect_dev(32'h1FC0_2000, DEV_NONE);
    expect_dev(32'h1D28_0000, DEV_NONE);
    // random addresses near every window edge, against the range reference
    for (int i = 0; i < 20000; i++) begin
      logic [31:0] a;
      a = BASES[$urandom % 11] + 32'($urandom % 32'h0004_0000) - 32'h0002_0000;
      a[1:0] = 2'b00;
      a[31:29] = 3'($urandom);
      if ($urandom % 8 == 0) a = $urandom;
      expect_dev(a, ref_dev(a));
    end
    addr = 32'h0000_0100; valid = 1'b0; #1;
    checks++;
    if (dram_err !== 1'b0) begin failures++; $display("FAIL dram_err without valid"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
