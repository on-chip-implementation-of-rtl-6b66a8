// tb_intr_unit: checks the interrupt unit's fixed priority, the acknowledge
// pulse to the served port one cycle after rx_ack, and the one-cycle gap
// before the next grant.
module tb_intr_unit;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [3:0] int_req, int_ack;
  logic intr, rx_ack;
  logic [1:0] port_num;
  int checks = 0, failures = 0;

  intr_unit dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic serve(input logic [3:0] req, input logic [1:0] exp_port);
    int n;
    repeat (2) @(posedge clk);
    #1 int_req = req;
    n = 0;
    while (!intr && n < 10) begin @(posedge clk); #1; n++; end
    check(intr && port_num == exp_port, $sformatf("req %b: got port %0d", req, port_num));
    check(n == 1, $sformatf("grant latency %0d, expected 1", n));
    check(int_ack == 4'b0000, "ack before rx_ack");
    rx_ack = 1'b1;
    @(posedge clk); #1;
    rx_ack = 1'b0;
    check(!intr, "intr still high after rx_ack");
    check(int_ack == (4'b0001 << exp_port), $sformatf("int_ack %b", int_ack));
    int_req = 4'b0000;        // the buffer pops its packet; others withdrawn
    @(posedge clk); #1;
    check(int_ack == 4'b0000, "int_ack longer than one cycle");
  endtask

  initial begin
    int_req = '0;
    rx_ack  = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    check(!intr, "intr without request");
    serve(4'b1010, 2'd1);
    serve(4'b1000, 2'd3);
    serve(4'b1111, 2'd0);
    serve(4'b0100, 2'd2);
    serve(4'b1100, 2'd2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
