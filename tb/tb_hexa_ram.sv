// tb_hexa_ram: random writes and reads against a reference array. Checks the
// one-cycle read latency, that rd_data holds while rd_en is low and that a
// read of a word written in the same cycle returns the old contents.
module tb_hexa_ram;
  localparam int WORDS = 37, WIDTH = 5;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic             wr_en, rd_en;
  logic [5:0]       wr_addr, rd_addr;
  logic [WIDTH-1:0] wr_data, rd_data;
  logic [WIDTH-1:0] model [WORDS];

  hexa_ram #(.WORDS(WORDS), .WIDTH(WIDTH)) dut (.*);

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] exp_q;
    logic             pend;
    wr_en = 0; rd_en = 0; wr_addr = 0; rd_addr = 0; wr_data = 0;
    // fill
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 6'(a); wr_data = WIDTH'($urandom); model[a] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    pend = 0; exp_q = '0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (pend) check("read data", int'(rd_data), int'(exp_q));
      wr_en   = 1'($urandom);
      wr_addr = 6'($urandom_range(0, WORDS - 1));
      wr_data = WIDTH'($urandom);
      rd_en   = ($urandom_range(0, 3) != 0);
      rd_addr = ($urandom_range(0, 3) == 0) ? wr_addr : 6'($urandom_range(0, WORDS - 1));
      if (rd_en) exp_q = model[rd_addr];        // old contents on a collision
      pend = 1;
      @(posedge clk); #1;
      if (wr_en) model[wr_addr] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
