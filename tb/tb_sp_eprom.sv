// tb_sp_eprom: programs every entry of the S/P table memory with a value derived from its
// address, reads all of them back through the (table, lane, byte) lookup port, then
// reprograms a few entries and checks that only those changed.
module tb_sp_eprom;
  logic        clk = 0, prog_we = 0;
  logic [11:0] prog_addr = '0;
  logic [31:0] prog_data = '0, data;
  logic [1:0]  tbl = '0, lane = '0;
  logic [7:0]  idx = '0;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  sp_eprom #(.TABLES(4), .DW(32)) dut (.*);

  function automatic logic [31:0] val(int a, int gen);
    return 32'(a) * 32'h0101_0101 ^ 32'(gen) * 32'h7F4A_7C15;
  endfunction

  task automatic read_check(input int a, input logic [31:0] e);
    @(negedge clk);
    {tbl, lane, idx} = 12'(a);
    #1;
    checks++;
    if (data !== e) begin
      failures++;
      $display("FAIL addr %0d: %h expected %h", a, data, e);
    end
  endtask

  initial begin
    for (int a = 0; a < 4096; a++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 12'(a); prog_data = val(a, 0);
    end
    @(negedge clk);
    prog_we = 0;
    for (int a = 0; a < 4096; a++) read_check(a, val(a, 0));
    for (int a = 100; a < 110; a++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 12'(a); prog_data = val(a, 1);
    end
    @(negedge clk);
    prog_we = 0;
    for (int a = 95; a < 115; a++) read_check(a, (a >= 100 && a < 110) ? val(a, 1) : val(a, 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
