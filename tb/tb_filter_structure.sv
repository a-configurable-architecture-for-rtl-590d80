// tb_filter_structure: one filter stage with an 8-bit operand (overflow at 128).
// Checks: accumulation over an operation and restart on in_first, capture into the serial
// register of the operation's slot, serial shifting, the overflow condition of the right
// slot, divide-by-two-and-round of the result when the slot overflows (also while holding),
// and that an inactive stage (third masking signal low) reports no overflow.
module tb_filter_structure;
  localparam int W = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [W-1:0] in_data, out_data;
  logic in_valid, in_first, in_last, in_slot;
  logic out_valid, out_first, out_last, out_slot;
  logic [1:0] ovf_in, ovf_cond, mask_q, shift;
  logic mask3_clr, mask3_shift, mask3_in, mask3_q;
  logic [W-1:0] ser_in [2];
  logic [W-1:0] ser_q [2];
  int checks = 0, failures = 0;

  filter_structure #(.W(W)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic feed(input int v, input bit f, input bit l, input bit s);
    in_data = W'(v); in_valid = 1; in_first = f; in_last = l; in_slot = s;
  endtask

  initial begin
    in_data = 0; in_valid = 0; in_first = 0; in_last = 0; in_slot = 0;
    ovf_in = 0; shift = 0; mask3_clr = 0; mask3_shift = 0; mask3_in = 0;
    ser_in[0] = 8'h11; ser_in[1] = 8'h22;
    repeat (2) @(negedge clk);
    rst = 0;
    // inactive stage: no overflow condition
    feed(100, 1, 0, 0); #1;
    feed(100, 0, 0, 0); #1;
    @(negedge clk);
    feed(100, 0, 0, 0); #1;
    chk(ovf_cond == 2'b00, "inactive stage raised overflow");
    in_valid = 0;
    // activate: third masking signal shifted in
    mask3_in = 1; mask3_shift = 1; @(negedge clk); mask3_shift = 0;
    chk(mask3_q, "third masking signal not loaded");
    // operation in slot 1: 5 + 7 + 9 (with a hold cycle) = 21
    feed(5, 1, 0, 1); @(negedge clk);
    chk(out_data == 5 && mask_q == 2'b10, "restart on first");
    in_valid = 0; @(negedge clk);
    chk(out_data == 5 && !out_valid, "hold without valid");
    feed(7, 0, 0, 1); @(negedge clk);
    feed(9, 0, 1, 1); @(negedge clk);
    chk(out_data == 21 && ser_q[1] == 21 && mask_q == 2'b00, "capture into chain 1");
    chk(out_valid && out_last && out_slot, "token pipelined");
    in_valid = 0;
    // shift chain 1
    shift = 2'b10; @(negedge clk); shift = 0;
    chk(ser_q[1] == 8'h22, "serial shift");
    // operation in slot 0 that overflows: 100 + 60 = 160 >= 128 -> halved to 80
    feed(100, 1, 0, 0); @(negedge clk);
    feed(60, 0, 0, 0); #1;
    chk(ovf_cond == 2'b01, "overflow condition of slot 0");
    ovf_in = ovf_cond; @(negedge clk); ovf_in = 0;
    chk(out_data == 80, "divide-by-two-and-round after overflow");
    // hold cycle while another stage of the operation overflows: 80 -> 40
    in_valid = 0; ovf_in = 2'b01; @(negedge clk); ovf_in = 0;
    chk(out_data == 40, "halving of a held value");
    // rounding: 40 + 47 = 87 with slot overflow -> 44 (round half up)
    feed(47, 0, 1, 0); ovf_in = 2'b01; @(negedge clk); ovf_in = 0;
    chk(out_data == 44 && ser_q[0] == 44, "rounded capture");
    // chain 0 halves with its slot while holding
    in_valid = 0; ovf_in = 2'b01; @(negedge clk); ovf_in = 0;
    chk(ser_q[0] == 22, "serial register halving");
    // clear the third masking signal
    mask3_clr = 1; @(negedge clk); mask3_clr = 0;
    chk(!mask3_q, "mask clear");
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
