// tb_coef_ram: checks the reset contents (INIT everywhere), random writes
// followed by reads with the one-sample registered latency, that rdata holds
// while ce is low, and read-during-write returning the old word.
module tb_coef_ram;
  import dpd_pkg::*;

  localparam int DEPTH = 32;
  localparam int AW    = $clog2(DEPTH);

  logic          clk = 0, rst_n = 0, ce = 0, we = 0;
  logic [AW-1:0] waddr, raddr;
  coef_t         wdata, rdata;
  int            checks = 0, failures = 0;
  coef_t         model [DEPTH];

  coef_ram #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    waddr = '0;
    raddr = '0;
    wdata = '0;
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1;
    ce    = 1;
    for (int a = 0; a < DEPTH; a++) begin
      model[a] = '{i: 16'sd16384, q: 16'sd0};
      raddr = AW'(a);
      @(posedge clk);
      #1;
      checks++;
      if (rdata != model[a]) failures++;
    end
    for (int k = 0; k < 2000; k++) begin
      logic [AW-1:0] ra;
      coef_t         expct;
      ra    = AW'($urandom);
      raddr = ra;
      we    = $urandom_range(0, 1);
      waddr = AW'($urandom);
      wdata = coef_t'($urandom);
      ce    = ($urandom_range(0, 3) != 0);
      expct = ce ? model[ra] : rdata;
      @(posedge clk);
      #1;
      if (we) model[waddr] = wdata;
      checks++;
      if (rdata != expct) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d addr=%0d", k, ra);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
