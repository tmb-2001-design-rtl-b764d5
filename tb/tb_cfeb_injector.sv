// tb_cfeb_injector: self-checking test of the CFEB pattern injector.
//
// A reference copy of the 5 x 3 injector RAMs is kept in the testbench.
// The test writes random words through random CFEB selects and write
// enables (several CFEBs or RAMs at once included), reads every RAM of
// every CFEB back through the select/read-enable path, then starts a
// playback with a random injector mask and compares every triad line in
// each of the 256 time bins against the reference, including that masked
// CFEBs stay silent, that nothing is driven after the playback ends, and
// the 2-clock start latency and 256-clock busy time. A watchdog ends the
// run if it hangs.
module tb_cfeb_injector;
  import tmb_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                                 rst;
  logic [NCFEB-1:0]                     inj_febsel, injector_mask;
  logic [2:0]                           inj_wen, inj_ren;
  logic [7:0]                           inj_adr;
  logic [15:0]                          inj_wdata, inj_rdata;
  logic                                 inj_wr, inj_start, busy;
  logic [NCFEB-1:0][NLY-1:0][NTRIAD-1:0] inj_triad;

  cfeb_injector dut (.*);

  int checks = 0, failures = 0;
  logic [15:0] ref_ram [NCFEB][3][256];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned cyc;
    rst = 1'b1;
    inj_febsel = '0; injector_mask = '0; inj_wen = '0; inj_ren = '0;
    inj_adr = '0; inj_wdata = '0; inj_wr = 1'b0; inj_start = 1'b0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;

    // fill every word once so the reference is complete
    for (int c = 0; c < NCFEB; c++)
      for (int r = 0; r < 3; r++)
        for (int a = 0; a < 256; a++) begin
          @(posedge clk);
          inj_febsel <= NCFEB'(1 << c);
          inj_wen    <= 3'(1 << r);
          inj_adr    <= 8'(a);
          inj_wdata  <= 16'($urandom);
          inj_wr     <= 1'b1;
          #1 ref_ram[c][r][a] = inj_wdata;
        end
    // random multi-select overwrites
    for (int i = 0; i < 400; i++) begin
      logic [NCFEB-1:0] fs;
      logic [2:0] we;
      logic [7:0] a;
      logic [15:0] d;
      fs = NCFEB'($urandom);
      we = 3'($urandom);
      a  = 8'($urandom);
      d  = 16'($urandom);
      @(posedge clk);
      inj_febsel <= fs; inj_wen <= we; inj_adr <= a; inj_wdata <= d; inj_wr <= 1'b1;
      for (int c = 0; c < NCFEB; c++)
        for (int r = 0; r < 3; r++)
          if (fs[c] && we[r]) ref_ram[c][r][a] = d;
    end
    @(posedge clk);
    inj_wr <= 1'b0; inj_wen <= '0;

    // write strobe low: no write
    @(posedge clk);
    inj_febsel <= '1; inj_wen <= '1; inj_adr <= 8'd17; inj_wdata <= ~ref_ram[0][0][17];
    @(posedge clk);
    inj_wen <= '0;

    // read back every word through the select path
    for (int c = 0; c < NCFEB; c++)
      for (int r = 0; r < 3; r++)
        for (int a = 0; a < 256; a += 5) begin
          @(posedge clk);
          inj_febsel <= NCFEB'(1 << c) | (NCFEB'($urandom) << (c + 1));
          inj_ren    <= 3'(1 << r) | (3'($urandom) << (r + 1));
          inj_adr    <= 8'(a);
          @(posedge clk);
          @(negedge clk);
          check(inj_rdata === ref_ram[c][r][a], $sformatf("readback c%0d r%0d a%0d", c, r, a));
        end

    // playback
    for (int run = 0; run < 3; run++) begin
      logic [NCFEB-1:0] m;
      m = (run == 0) ? '1 : NCFEB'($urandom);
      @(posedge clk);
      injector_mask <= m;
      inj_start     <= 1'b1;
      @(posedge clk);
      inj_start <= 1'b0;
      // cycle after the start edge: busy set, nothing driven yet
      @(negedge clk);
      check(busy, "busy after start");
      check(inj_triad == '0, "no output before first word");
      for (int t = 0; t < 256; t++) begin
        @(posedge clk);
        @(negedge clk);
        for (int c = 0; c < NCFEB; c++)
          for (int l = 0; l < NLY; l++) begin
            logic [7:0] exp;
            exp = m[c] ? ((l % 2) ? ref_ram[c][l/2][t][15:8] : ref_ram[c][l/2][t][7:0]) : 8'h00;
            check(inj_triad[c][l] === exp, $sformatf("run%0d t%0d c%0d l%0d", run, t, c, l));
          end
        if (t == 254) check(busy, "busy through last bin");
      end
      check(!busy, "busy ends after 256 bins");
      @(posedge clk);
      @(negedge clk);
      check(inj_triad == '0, "idle after playback");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
