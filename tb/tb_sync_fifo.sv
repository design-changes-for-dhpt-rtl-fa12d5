`timescale 1ps/1fs
// tb_sync_fifo: random push/pop traffic against a queue model, FIFO1 size
// (256 x 24 bits). Checks data order, empty/full flags and the count, and
// that a push into a full FIFO is dropped.
module tb_sync_fifo;
  localparam int W = 24, D = 256;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [W-1:0] din = 0, dout;
  logic empty, full;
  logic [8:0] count;
  int checks = 0, failures = 0, n_full = 0;
  logic [W-1:0] model[$];

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);
  always #6250 clk = ~clk;

  initial begin
    #1000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic pu, po;
    logic [W-1:0] d;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    for (int n = 0; n < 3000; n++) begin
      // phases: fill, drain, mixed
      if (n < 400)       begin pu = ($urandom_range(0, 9) < 8); po = ($urandom_range(0, 9) < 1); end
      else if (n < 1000) begin pu = ($urandom_range(0, 9) < 1); po = ($urandom_range(0, 9) < 8); end
      else               begin pu = $urandom_range(0, 1); po = $urandom_range(0, 1); end
      d = W'($urandom());
      checks++;
      if (empty != (model.size() == 0) || full != (model.size() == D) || count != 9'(model.size())) begin
        failures++; $display("FAIL flags at %0d", n);
      end
      if (!empty) begin
        checks++;
        if (dout !== model[0]) begin failures++; $display("FAIL data at %0d", n); end
      end
      if (full) n_full++;
      push <= pu; pop <= po; din <= d;
      @(posedge clk); #1;
      begin
        bit acc;
        acc = pu && (model.size() < D);   // a full FIFO drops the push
        if (po && model.size() > 0) void'(model.pop_front());
        if (acc) model.push_back(d);
      end
    end
    checks++; if (n_full == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
