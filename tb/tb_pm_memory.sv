// tb_pm_memory: self-checking test of the path metric memory at L = 16.
// After reset and after init the memory must hold metric 0 in slot 0 and 255
// elsewhere; a write must appear on the next clock edge; with we = 0 the contents
// must hold; init must win over a simultaneous write.
module tb_pm_memory;
  localparam int L = 16, KEY_W = 8, TAG_W = 5, W = KEY_W + TAG_W;
  logic clk = 0, rst_n = 1, init = 0, we = 0;
  logic [W-1:0] wdata [L];
  logic [W-1:0] rdata [L];
  logic [W-1:0] model [L];
  int checks = 0, failures = 0;

  pm_memory dut (.clk(clk), .rst_n(rst_n), .init(init), .we(we), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  task automatic start_model();
    for (int l = 0; l < L; l++) model[l] = (l == 0) ? W'(0) : {8'hff, TAG_W'(2 * l)};
  endtask

  task automatic compare(input string what);
    for (int l = 0; l < L; l++) begin
      checks++;
      if (rdata[l] !== model[l]) begin
        failures++; $display("FAIL %s slot %0d: %h expected %h", what, l, rdata[l], model[l]);
      end
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < L; l++) wdata[l] = '0;
    #1 rst_n = 0;
    #1;
    start_model();
    compare("reset");
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      we   = ($urandom % 3) != 0;
      init = ($urandom % 17) == 0;
      for (int l = 0; l < L; l++) wdata[l] = W'($urandom);
      @(posedge clk);
      if (init) start_model();
      else if (we) model = wdata;
      #1;
      compare(init ? "init" : (we ? "write" : "hold"));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
