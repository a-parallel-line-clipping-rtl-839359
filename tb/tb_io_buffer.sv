// tb_io_buffer: self-checking test of the GP I/O buffer.
//
// Random writes and reads against a queue model. Each cycle it checks that
// in_ready is high exactly when the buffer holds fewer than DEPTH words,
// that out_valid is high exactly when it holds any, and that words come out
// in the order they went in. Runs with the default depth of 2 and counts the
// full and empty states so both are seen.
module tb_io_buffer;

  localparam int unsigned WIDTH    = 25;
  localparam int unsigned DEPTH    = 2;
  localparam int unsigned WATCHDOG = 50_000;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             in_valid = 1'b0, out_ready = 1'b0;
  logic [WIDTH-1:0] in_data = '0;
  logic             in_ready, out_valid;
  logic [WIDTH-1:0] out_data;
  int               checks = 0, failures = 0;
  int               n_full = 0, n_empty = 0;
  logic [WIDTH-1:0] model[$];

  always #5 clk = ~clk;

  io_buffer dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      in_valid  = ($urandom_range(0, 99) < (((i / 500) % 2 == 1) ? 70 : 30));
      out_ready = ($urandom_range(0, 99) < (((i / 500) % 2 == 1) ? 30 : 70));
      in_data   = WIDTH'($urandom);
      #1;
      check(in_ready == (model.size() < DEPTH), $sformatf("in_ready %0b with %0d words", in_ready, model.size()));
      check(out_valid == (model.size() != 0), $sformatf("out_valid %0b with %0d words", out_valid, model.size()));
      if (out_valid && model.size() != 0)
        check(out_data == model[0], $sformatf("data %h, expected %h", out_data, model[0]));
      if (model.size() == DEPTH) n_full++;
      if (model.size() == 0) n_empty++;
      @(posedge clk);
      if (out_valid && out_ready && model.size() != 0) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_data);
    end
    check(n_full > 0 && n_empty > 0, "full and empty states not both reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
