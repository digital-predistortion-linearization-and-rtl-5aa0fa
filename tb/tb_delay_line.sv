// tb_delay_line: for every delay 0..DEPTH (and one value beyond, which must
// clamp to DEPTH) streams random samples and checks y(n) = x(n - del).
module tb_delay_line;
  import dpd_pkg::*;

  localparam int DEPTH = 16;
  localparam int DELW  = $clog2(DEPTH + 1);

  logic            clk = 0, rst_n = 0, ce = 0;
  logic [DELW-1:0] del;
  cplx_t           x, y;
  int              checks = 0, failures = 0;

  delay_line #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cplx_t hist [$];

  initial begin
    x   = CPLX_ZERO;
    del = '0;
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1;
    for (int d = 0; d <= DEPTH + 3; d++) begin
      int eff;
      eff = (d > DEPTH) ? DEPTH : d;
      del = DELW'(d);
      hist.delete();
      // flush with known samples; the line holds zeros only right after reset,
      // so the first DEPTH outputs of each run are not checked
      for (int k = 0; k < 3 * DEPTH; k++) begin
        x  = '{i: s16_t'($urandom), q: s16_t'($urandom)};
        ce = ($urandom_range(0, 3) != 0);
        #1;
        if (ce) begin
          hist.push_front(x);
          if (hist.size() > eff && k >= DEPTH) begin
            checks++;
            if (y != hist[eff]) begin
              failures++;
              if (failures < 10) $display("FAIL del=%0d k=%0d", d, k);
            end
          end
        end
        @(posedge clk);
        #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
