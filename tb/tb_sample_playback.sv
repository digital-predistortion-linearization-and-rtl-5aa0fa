// tb_sample_playback: loads 64 words, plays the first 10 cyclically for
// several passes and checks the order, out_valid, the wrap pulse on the
// last word of each pass, restart from word 0 after run drops, and that a
// full-depth loop (len = DEPTH) also wraps correctly.
module tb_sample_playback;
  import dpd_pkg::*;

  localparam int DEPTH = 64;
  localparam int AW    = $clog2(DEPTH);

  logic          clk = 0, rst_n = 0, we = 0, run = 0;
  logic [AW-1:0] waddr;
  cplx_t         wdata, x;
  logic [AW:0]   len;
  logic          out_valid, wrap;
  int            checks = 0, failures = 0, nwrap = 0;
  cplx_t         model [DEPTH];

  sample_playback #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic play(input int l, input int cnt);
    len = (AW + 1)'(l);
    run = 1;
    for (int k = 0; k < cnt; k++) begin
      @(posedge clk);
      #1;
      checks++;
      if (!out_valid || x != model[k % l] || wrap != ((k % l) == l - 1)) begin
        failures++;
        if (failures < 10) $display("FAIL l=%0d k=%0d", l, k);
      end
      if (wrap) nwrap++;
    end
    run = 0;
    @(posedge clk);
    #1;
    checks++;
    if (out_valid) failures++;
  endtask

  initial begin
    waddr = '0;
    wdata = '0;
    len   = '0;
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1;
    for (int a = 0; a < DEPTH; a++) begin
      model[a] = cplx_t'($urandom);
      we    = 1;
      waddr = AW'(a);
      wdata = model[a];
      @(posedge clk);
      #1;
    end
    we = 0;
    play(10, 47);
    play(10, 12);
    play(DEPTH, 2 * DEPTH + 3);
    checks++;
    if (nwrap != 4 + 1 + 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
