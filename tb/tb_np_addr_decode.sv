// tb_np_addr_decode: self-checking test of the navigation processor address
// decoder. Each case gives an address and the device expected from the NP
// memory map, written out by hand: window edges, addresses just outside,
// rollover through undecoded bits, and the three ignored top bits. Then
// 20000 random addresses around every window edge are compared with a
// reference that states the map as plain address ranges.
module tb_np_addr_decode;
  import gns_pkg::*;
  logic [31:0] addr;
  logic        valid;
  dev_e        dev;
  logic        dram_err;
  int checks = 0, failures = 0;

  np_addr_decode dut (.addr, .valid, .dev, .dram_err);

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
    if (p >= 32'h1C10_0000 && p <= 32'h1C10_FFFF)    return DEV_RST_ACTEL;
    if (p >= 32'h1C18_0000 && p <= 32'h1C18_000F)    return DEV_PCI_ACTEL;
    if (p >= 32'h1D20_0000 && p <= 32'h1D20_1FFF)    return DEV_PCI_BUF;
    if (p >= 32'h1D28_0000 && p <= 32'h1D28_1FFF)    return DEV_NPTP_BUF;
    if (p >= 32'h1F00_0000)                          return DEV_FLASH;
    return DEV_NONE;
  endfunction
  localparam logic [31:0] BASES [15] = '{32'h0000_0000, 32'h1000_0000, 32'h1020_0000, 32'h1800_0000, 32'h1C10_0000, 32'h1C11_0000, 32'h1C18_0000, 32'h1C18_0010, 32'h1D20_0000, 32'h1D20_2000, 32'h1D28_0000, 32'h1D28_2000, 32'h1F00_0000, 32'h1FC0_0000, 32'h0FFF_FFFC};

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expect_dev(32'h0000_0000, DEV_DRAM);
    expect_dev(32'h0FFF_FFFC, DEV_DRAM);
    expect_dev(32'hA000_1234, DEV_DRAM);      // top three bits ignored
    expect_dev(32'h1000_0000, DEV_SRAM);
    expect_dev(32'h101F_FFFC, DEV_SRAM);
    expect_dev(32'h1020_0000, DEV_SRAM);      // bit 21 undecoded: rollover
    expect_dev(32'h17E0_0000, DEV_SRAM);      // bits 21-26 undecoded
    expect_dev(32'hB000_0010, DEV_SRAM);      // kseg1 view of SRAM
    expect_dev(32'h1C10_0000, DEV_RST_ACTEL);
    expect_dev(32'h1C10_B466, DEV_RST_ACTEL);
    expect_dev(32'h1C10_FFFE, DEV_RST_ACTEL);
    expect_dev(32'hBC10_794C, DEV_RST_ACTEL);
    expect_dev(32'h1C11_0000, DEV_NONE);
    expect_dev(32'h1C18_0000, DEV_PCI_ACTEL);
    expect_dev(32'h1C18_000E, DEV_PCI_ACTEL);
    expect_dev(32'h1C18_0010, DEV_NONE);
    expect_dev(32'h1D20_0000, DEV_PCI_BUF);
    expect_dev(32'h1D20_1FFE, DEV_PCI_BUF);
    expect_dev(32'h1D20_2000, DEV_NONE);
    expect_dev(32'h1D28_0000, DEV_NPTP_BUF);
    expect_dev(32'h1D28_1FFE, DEV_NPTP_BUF);
    expect_dev(32'h1D27_FFFE, DEV_NONE);
    expect_dev(32'h1F00_0000, DEV_FLASH);
    expect_dev(32'h1F3F_FFFC, DEV_FLASH);
    expect_dev(32'h1FC0_0000, DEV_FLASH);     // bits 22-23 undecoded
    expect_dev(32'hBFC0_0000, DEV_FLASH);     // reset vector lands in Flash
    expect_dev(32'h1E00_0000, DEV_NONE);
    // random addresses near every window edge, against the range reference
    for (int i = 0; i < 20000; i++) begin
      logic [31:0] a;
      a = BASES[$urandom % 15] + 32'($urandom % 32'h0004_0000) - 32'h0002_0000;
      a[1:0] = 2'b00;
      a[31:29] = 3'($urandom);
      if ($urandom % 8 == 0) a = $urandom;
      expect_dev(a, ref_dev(a));
    end
    // valid low: no DRAM error even in the DRAM range
    addr = 32'h0000_0100; valid = 1'b0; #1;
    checks++;
    if (dram_err !== 1'b0) begin failures++; $display("FAIL dram_err without valid"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
