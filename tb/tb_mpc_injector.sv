// tb_mpc_injector: self-checking test of the MPC test-pattern injector.
//
// Fills the four frame RAMs with random words (single and multiple write
// enables) and reads them back. Then several injections with random frame
// counts and MPC reply delays: every clock the bench records tx, the four
// frames and a random MPC reply; it checks that exactly nframes frame sets
// come out, in address order, starting two clocks after the start pulse,
// and that the reply seen mpc_delay clocks after each frame set is the one
// stored at its address. A zero frame count must send nothing. A watchdog
// ends the run if it hangs.
module tb_mpc_injector;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic             rst, start, wr, busy, tx;
  logic [7:0]       nframes, adr;
  logic [3:0]       mpc_delay, wen, ren, acc_rdata, mpc_reply;
  logic [15:0]      wdata, rdata;
  logic [3:0][15:0] frames;

  mpc_injector dut (.*);

  int checks = 0, failures = 0;
  logic [15:0] ref_ram [4][256];
  logic [3:0]  ref_acc [256];

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

  // per-clock trace of the outputs and of the reply the bench drives
  bit               tr_tx [$];
  logic [3:0][15:0] tr_fr [$];
  logic [3:0]       tr_rep [$];

  initial begin
    rst = 1'b1; start = 1'b0; wr = 1'b0; nframes = '0; adr = '0; mpc_delay = 4'd7;
    wen = '0; ren = '0; wdata = '0; mpc_reply = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    for (int r = 0; r < 4; r++)
      for (int a = 0; a < 256; a++) begin
        @(negedge clk);
        wen = 4'(1 << r); adr = 8'(a); wdata = 16'($urandom); wr = 1'b1;
        ref_ram[r][a] = wdata;
      end
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      wen = 4'($urandom); adr = 8'($urandom); wdata = 16'($urandom); wr = 1'b1;
      for (int r = 0; r < 4; r++) if (wen[r]) ref_ram[r][adr] = wdata;
    end
    @(negedge clk);
    wr = 1'b0; wen = '0;
    for (int r = 0; r < 4; r++)
      for (int a = 0; a < 256; a += 3) begin
        @(negedge clk);
        ren = 4'(1 << r) | (4'($urandom) << (r + 1)); adr = 8'(a);
        @(negedge clk);
        check(rdata == ref_ram[r][a], $sformatf("read back RAM %0d address %0d", r, a));
      end

    for (int run = 0; run < 6; run++) begin
      int n, d, first;
      n = (run == 0) ? 5 : (run == 5) ? 0 : 1 + ($urandom % 40);
      d = 1 + ($urandom % 15);
      nframes = 8'(n); mpc_delay = 4'(d);
      tr_tx = {}; tr_fr = {}; tr_rep = {};
      @(negedge clk);
      start = 1'b1;
      // trace index k is taken k+1 clocks after the edge that samples start
      for (int k = 0; k < n + d + 8; k++) begin
        @(negedge clk);
        start = 1'b0;
        tr_tx.push_back(tx);
        tr_fr.push_back(frames);
        mpc_reply = 4'($urandom);
        tr_rep.push_back(mpc_reply);
      end
      first = -1;
      for (int k = 0; k < tr_tx.size(); k++) if (tr_tx[k] && first < 0) first = k;
      if (n == 0) begin
        check(first < 0, "nothing sent for a zero frame count");
        continue;
      end
      check(first == 1, $sformatf("first frame two clocks after start (got %0d)", first + 1));
      for (int k = 0; k < tr_tx.size(); k++)
        check(tr_tx[k] == (k >= first && k < first + n), $sformatf("run %0d tx at %0d", run, k));
      for (int j = 0; j < n; j++) begin
        for (int r = 0; r < 4; r++)
          check(tr_fr[first + j][r] == ref_ram[r][j], $sformatf("run %0d frame %0d RAM %0d", run, j, r));
        ref_acc[j] = tr_rep[first + j + d];
      end
      for (int j = 0; j < n; j++) begin
        @(negedge clk);
        adr = 8'(j);
        @(negedge clk);
        check(acc_rdata == ref_acc[j], $sformatf("run %0d reply stored at %0d", run, j));
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
