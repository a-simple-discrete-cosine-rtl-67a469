// tb_zout_stage: random check of one pump stage against a reference model.
// Each clock the stage must hold its own input if pump was high, the
// adjacent input otherwise, and zero after reset.
module tb_zout_stage;
  localparam int W = 12;
  logic clk = 1'b0, rst_n = 1'b0, pump = 1'b0;
  logic signed [W-1:0] own_in = '0, adj_in = '0, z_out;
  logic signed [W-1:0] model;
  int checks = 0, failures = 0, cycles = 0;

  zout_stage #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++; if (z_out !== '0) begin failures++; $display("FAIL reset value %0d", z_out); end
    rst_n = 1'b1;
    repeat (500) begin
      pump   = ($urandom_range(0, 3) == 0);
      own_in = W'($urandom);
      adj_in = W'($urandom);
      @(posedge clk);
      model = pump ? own_in : adj_in;
      #1;
      checks++;
      if (z_out !== model) begin
        failures++;
        if (failures < 10) $display("FAIL z_out=%0d exp=%0d", z_out, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
