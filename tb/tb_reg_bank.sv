// tb_reg_bank: writes random values to random registers while reading four random
// addresses each cycle, comparing every read with a reference array; also checks the
// reset value.
module tb_reg_bank;
  logic        clk = 0, rst_n = 0, we = 0;
  logic [3:0]  raddr [4];
  logic [31:0] rdata [4];
  logic [3:0]  waddr = '0;
  logic [31:0] wdata = '0;
  logic [31:0] model [16];
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  reg_bank #(.NREGS(16), .DW(32), .NREAD(4)) dut (.*);

  initial begin
    for (int p = 0; p < 4; p++) raddr[p] = '0;
    for (int i = 0; i < 16; i++) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (we) model[waddr] = wdata;
      for (int p = 0; p < 4; p++) begin
        checks++;
        if (rdata[p] !== model[raddr[p]]) begin
          failures++;
          $display("FAIL port %0d reg %0d: %h expected %h", p, raddr[p], rdata[p], model[raddr[p]]);
        end
      end
      we = 1'($urandom());
      waddr = 4'($urandom());
      wdata = $urandom();
      for (int p = 0; p < 4; p++) raddr[p] = 4'($urandom());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
