// tb_pci_exchange: the once-per-second data exchange between the C&DH and the
// navigation processor (NP) through the PCI buffer, run on the whole design
// (gns_top) at its default parameters.
//
// The PCI buffer layout is the software's: two buffer sets (0 and 1), each
// with spacecraft attitude (17 words), a telecommand packet (1040 words),
// unpacketized data (67 words) and six 131-word output packets, one reserved
// word after each field; then a vector word, spacecraft and separation time,
// the new-data words, spare space and the four interrupt words. The table
// below gives each field's start byte offset and word count; the test first
// checks that the fields tile the 8 KB buffer with no gap and no overlap.
//
// Each simulated second uses one buffer set, in the order the system uses:
//   1. the GTA steered 1PPS reaches the C&DH (gns_1pps) and the NP (INT[2]);
//   2. the C&DH writes its inputs (attitude, telecommand, times, new-data
//      words) and then the 1PPS word 0x0FFF;
//   3. INT[5-2] interrupts the NP, which acknowledges it, reads every input
//      and writes every output (unpacketized data, six packets, vector word);
//   4. the C&DH reads all outputs back.
// Data words are a fixed function of (second, field, word), so no data file
// is needed. The test counts word mismatches on both sides and measures the
// INT[5-2] latency from the C&DH write of word 0x0FFF (two clock edges: one
// in the buffer, one in the PCI Actel latch). The 15 ms and 250 ms windows
// of the exchange are kept by software and are not modelled as time here.
module tb_pci_exchange;
  import gns_pkg::*;

  logic         clk = 0, por_n = 1;
  logic         master_rst = 0, gns_rst = 0, console_rst = 0, console_en = 0;
  logic         np_edac_derr = 0, tp_edac_derr = 0, flash_busy = 0, iem_id = 0;
  bus_req_t     np_req = '0, tp_req = '0;
  logic [31:0]  np_rdata, tp_rdata, np_ext_rdata = '0, tp_ext_rdata = '0;
  logic         np_rvalid, tp_rvalid, np_flash_cs, np_sram_cs, tp_sram_cs;
  logic         cdh_en = 0, cdh_we = 0;
  logic [11:0]  cdh_addr = '0;
  logic [15:0]  cdh_wdata = '0, cdh_rdata;
  gta_ctrl_wr_t gta_ctrl_wr;
  gta_ctrl_rd_t gta_ctrl_rd = '0;
  gta_ch_wr_t   gta_ch_wr [GTA_CHANNELS];
  gta_ch_rd_t   gta_ch_rd [GTA_CHANNELS];
  logic         gta_aic_evt = 0, gta_mic_evt = 0, gta_pps = 0, gns_1pps;
  logic         np_rst, tp_rst, gta_rst, gta_io_en, flash_wr_en, flash_rst;
  logic [1:0]   np_test_pt, tp_test_pt;
  logic [15:0]  reset_cause;
  logic         tp_wr_refused;
  logic [5:0]   np_int, tp_int;
  logic [31:0]  np_int_exp, tp_int_exp;

  gns_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  // ------------------------------------------------------------ buffer map
  typedef enum logic [1:0] {RSVD, IN, OUT, CTRL} dir_e;
  typedef struct {
    string       name;
    logic [15:0] start;   // byte offset
    int          words;
    dir_e        dir;     // IN: C&DH to NP, OUT: NP to C&DH
    int          set;     // buffer set 0/1, -1 for shared fields
  } field_t;

  localparam int NF = 46;
  field_t map [NF];

  function automatic field_t f(string n, logic [15:0] s, int w, dir_e d, int b);
    field_t r;
    r.name = n; r.start = s; r.words = w; r.dir = d; r.set = b;
    return r;
  endfunction

  initial begin
    int i;
    i = 0;
    for (int b = 0; b < 2; b++) begin
      logic [15:0] o;
      o = (b == 0) ? 16'h0000 : 16'h0EFE;
      map[i++] = f("attitude",     o,          17,   IN,   b); o += 34;
      map[i++] = f("reserved",     o,          1,    RSVD, b); o += 2;
      map[i++] = f("telecommand",  o,          1040, IN,   b); o += 2080;
      map[i++] = f("reserved",     o,          1,    RSVD, b); o += 2;
      map[i++] = f("unpacketized", o,          67,   OUT,  b); o += 134;
      map[i++] = f("reserved",     o,          1,    RSVD, b); o += 2;
      for (int p = 1; p <= 6; p++) begin
        map[i++] = f($sformatf("packet %0d", p), o, 131, OUT, b); o += 262;
        map[i++] = f("reserved",   o,          1,    RSVD, b); o += 2;
      end
    end
    map[i++] = f("vector word",     16'h1DFC, 1,   OUT,  -1);
    map[i++] = f("spacecraft time", 16'h1DFE, 2,   IN,   -1);
    map[i++] = f("separation time", 16'h1E02, 2,   IN,   -1);
    map[i++] = f("new data buffer", 16'h1E06, 1,   IN,   -1);
    map[i++] = f("new data avail",  16'h1E08, 1,   IN,   -1);
    map[i++] = f("spare",           16'h1E0A, 247, RSVD, -1);
    map[i++] = f("intr addr 3",     16'h1FF8, 1,   RSVD, -1);
    map[i++] = f("intr addr 2",     16'h1FFA, 1,   RSVD, -1);
    map[i++] = f("intr addr 1",     16'h1FFC, 1,   RSVD, -1);
    map[i++] = f("intr addr 0",     16'h1FFE, 1,   CTRL, -1);
    if (i != NF) $fatal(1, "map has %0d fields", i);
  end

  // the data word of a field in a given second
  function automatic logic [15:0] word(int sec, int fi, int w);
    return 16'((sec * 16'h3D1) ^ (fi * 16'h1F3) ^ (w * 16'h0A7) ^ 16'h5A00);
  endfunction

  // -------------------------------------------------------------- bus tasks
  task automatic np_write(input logic [31:0] a, input logic [15:0] d);
    @(negedge clk); np_req = '{valid: 1'b1, we: 1'b1, addr: a, wdata: 32'(d)};
    @(negedge clk); np_req = '0;
  endtask
  task automatic np_read(input logic [31:0] a, output logic [15:0] d);
    @(negedge clk); np_req = '{valid: 1'b1, we: 1'b0, addr: a, wdata: '0};
    @(negedge clk); np_req = '0;
    d = np_rdata[15:0];
  endtask
  task automatic cdh_write(input logic [11:0] w, input logic [15:0] d);
    @(negedge clk); cdh_en = 1; cdh_we = 1; cdh_addr = w; cdh_wdata = d;
    @(negedge clk); cdh_en = 0; cdh_we = 0;
  endtask
  task automatic cdh_read(input logic [11:0] w, output logic [15:0] d);
    @(negedge clk); cdh_en = 1; cdh_we = 0; cdh_addr = w;
    @(negedge clk); cdh_en = 0; d = cdh_rdata;
  endtask

  localparam logic [31:0] NP_RA   = 32'h1C10_0000;
  localparam logic [31:0] NP_PCIA = 32'h1C18_0000;
  localparam logic [31:0] NP_PCIB = 32'hBD20_0000;   // uncached kernel alias

  function automatic bit in_second(int fi, int sec);
    return map[fi].set == -1 || map[fi].set == sec % 2;
  endfunction

  int np_bad, cdh_bad, moved_in, moved_out, lat;
  logic [15:0] d;

  initial begin
    foreach (gta_ch_rd[c]) gta_ch_rd[c] = '0;
    #1 por_n = 0;
    repeat (2) @(negedge clk);
    por_n = 1;
    repeat (2) @(negedge clk);

    // the map tiles the whole 8 KB buffer
    begin
      int next, total;
      next = 0; total = 0;
      for (int fi = 0; fi < NF; fi++) begin
        chk(int'(map[fi].start) == next,
            $sformatf("field %s starts at %h, expected %h", map[fi].name, map[fi].start, next));
        next = int'(map[fi].start) + 2 * map[fi].words;
        total += map[fi].words;
      end
      chk(next == 8192 && total == 4096, $sformatf("map ends at %h, %0d words", next, total));
    end

    for (int sec = 0; sec < 2; sec++) begin
      np_bad = 0; cdh_bad = 0; moved_in = 0; moved_out = 0;

      // 1. steered 1PPS
      np_write(NP_RA | 32'h794C, 0);            // keep the watchdog fed
      @(negedge clk) gta_pps = 1;
      @(negedge clk);
      chk(gns_1pps && np_int[2], "1PPS to the C&DH and NP INT[2]");
      gta_pps = 0;
      np_write(NP_PCIA | 32'hA, 0);
      chk(!np_int[2], "NP acknowledges the 1PPS");

      // 2. C&DH inputs, then the 1PPS word
      for (int fi = 0; fi < NF; fi++)
        if (map[fi].dir == IN && in_second(fi, sec))
          for (int w = 0; w < map[fi].words; w++)
            cdh_write(12'(map[fi].start >> 1) + 12'(w), word(sec, fi, w));
      chk(!np_int_exp[2], "no INT[5-2] before word 0x0FFF");
      @(negedge clk); cdh_en = 1; cdh_we = 1; cdh_addr = 12'hFFF; cdh_wdata = 16'(sec);
      lat = 0;
      do begin @(negedge clk); cdh_en = 0; cdh_we = 0; lat++; end
      while (!np_int_exp[2] && lat < 10);
      chk(lat == 2, $sformatf("INT[5-2] %0d clock edges after the C&DH 1PPS word", lat));

      // 3. NP: acknowledge, read inputs, write outputs
      np_write(NP_PCIA | 32'h8, 0);
      chk(!np_int_exp[2], "NP acknowledges INT[5-2]");
      np_write(NP_RA | 32'h794C, 0);
      for (int fi = 0; fi < NF; fi++)
        if (map[fi].dir == IN && in_second(fi, sec))
          for (int w = 0; w < map[fi].words; w++) begin
            np_read(NP_PCIB + 32'(map[fi].start) + 32'(2 * w), d);
            if (d != word(sec, fi, w)) np_bad++;
            moved_in++;
          end
      np_write(NP_RA | 32'h794C, 0);
      for (int fi = 0; fi < NF; fi++)
        if (map[fi].dir == OUT && in_second(fi, sec))
          for (int w = 0; w < map[fi].words; w++)
            np_write(NP_PCIB + 32'(map[fi].start) + 32'(2 * w), word(sec, fi, w));

      // 4. C&DH reads the outputs
      for (int fi = 0; fi < NF; fi++)
        if (map[fi].dir == OUT && in_second(fi, sec))
          for (int w = 0; w < map[fi].words; w++) begin
            cdh_read(12'(map[fi].start >> 1) + 12'(w), d);
            if (d != word(sec, fi, w)) cdh_bad++;
            moved_out++;
          end

      $display("second %0d (buffer set %0d): %0d input and %0d output words moved",
               sec, sec % 2, moved_in, moved_out);
      chk(moved_in == 17 + 1040 + 6 && moved_out == 67 + 6 * 131 + 1,
          "every field of the buffer set moved");
      chk(np_bad == 0, $sformatf("NP read %0d wrong input words", np_bad));
      chk(cdh_bad == 0, $sformatf("C&DH read %0d wrong output words", cdh_bad));
      chk(!np_rst, "NP not reset during the exchange");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
