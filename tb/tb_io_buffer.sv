// tb_io_buffer: streams random words through both FIFOs of the I/O buffer. On the input
// side words arrive with random gaps and the bus pops them at random; on the output side the
// bus pushes at random and the receiver takes them with random back-pressure. Order and
// values are checked against queues, and both the full and the empty condition must occur.
module tb_io_buffer;
  logic        clk = 0, rst_n = 0;
  logic        ext_in_valid = 0, ext_in_ready, in_pop = 0, in_empty;
  logic [31:0] ext_in_data = '0, in_data;
  logic        out_push = 0, out_full, ext_out_valid, ext_out_ready = 0;
  logic [31:0] out_data = '0, ext_out_data;
  logic [31:0] qi[$], qo[$];
  int          checks = 0, failures = 0, n_in_full = 0, n_out_full = 0, n_in_empty = 0;
  int          sent_in = 0, got_in = 0, sent_out = 0, got_out = 0;

  always #5 clk = ~clk;

  io_buffer #(.DW(32), .DEPTH(8)) dut (.*);

  always @(posedge clk) if (rst_n) begin
    if (ext_in_valid && ext_in_ready) begin qi.push_back(ext_in_data); sent_in++; end
    if (in_pop) begin
      checks++;
      if (qi.size() == 0 || in_data !== qi[0]) begin failures++; $display("FAIL input side"); end
      else void'(qi.pop_front());
      got_in++;
    end
    if (out_push) begin qo.push_back(out_data); sent_out++; end
    if (ext_out_valid && ext_out_ready) begin
      checks++;
      if (qo.size() == 0 || ext_out_data !== qo[0]) begin failures++; $display("FAIL output side"); end
      else void'(qo.pop_front());
      got_out++;
    end
    if (!ext_in_ready) n_in_full++;
    if (out_full) n_out_full++;
    if (in_empty) n_in_empty++;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      // first half: slow consumers (buffers fill), second half: slow producers
      ext_in_valid  = ($urandom() % 4) < ((t < 2000) ? 3 : 1);
      ext_in_data   = $urandom();
      in_pop        = !in_empty && (($urandom() % 4) < ((t < 2000) ? 1 : 3));
      out_push      = !out_full && (($urandom() % 4) < ((t < 2000) ? 3 : 1));
      out_data      = $urandom();
      ext_out_ready = ($urandom() % 4) < ((t < 2000) ? 1 : 3);
    end
    checks += 3;
    if (n_in_full == 0 || n_out_full == 0) begin failures++; $display("FAIL never full"); end
    if (n_in_empty == 0) begin failures++; $display("FAIL never empty"); end
    if (got_in == 0 || got_out == 0) begin failures++; $display("FAIL nothing transferred"); end
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
