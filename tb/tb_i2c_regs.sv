// tb_i2c_regs: self-checking test of the I2C register slave (address 0x3A,
// 4 configuration registers, 16 status registers at 16..31).
// A bus master modelled here drives SCL and SDA (open drain: the line is
// low when either side pulls it) with 20 system clocks per half bit.
// Random transactions against a register model:
//  * writes of 1..4 bytes from a random pointer (configuration registers
//    must take exactly the written bytes, status registers ignore writes);
//  * pointer write, repeated START, reads of 1..6 bytes with ACK and a
//    final NACK: configuration bytes, status bytes (random st values) and
//    unmapped addresses (0) must come back in order;
//  * a transfer to another device address must not be acknowledged and
//    must change nothing.
// Every byte sent by the master must be acknowledged by the slave.
module tb_i2c_regs;
  localparam int HB = 20;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic scl = 1, sda_m = 1, sda_oe, sda, cfg_mism;
  logic [31:0] cfg;
  logic [127:0] st;
  logic [7:0] model [4];

  assign sda = sda_m && !sda_oe;
  i2c_regs dut (.clk, .rst_n, .scl, .sda_in(sda), .sda_oe, .cfg, .st, .cfg_mism);

  task automatic half(); repeat (HB) @(posedge clk); endtask
  task automatic start();
    sda_m = 1; half(); scl = 1; half(); sda_m = 0; half(); scl = 0; half();
  endtask
  task automatic stop();
    sda_m = 0; half(); scl = 1; half(); sda_m = 1; half(); half();
  endtask
  task automatic wbit(input logic b);
    sda_m = b; half(); scl = 1; half(); half(); scl = 0; half();
  endtask
  task automatic rbit(output logic b);
    sda_m = 1; half(); scl = 1; half(); b = sda; half(); scl = 0; half();
  endtask
  task automatic wbyte(input logic [7:0] v, output logic ack);
    logic a;
    for (int i = 7; i >= 0; i--) wbit(v[i]);
    rbit(a);
    ack = !a;
  endtask
  task automatic rbyte(input logic send_ack, output logic [7:0] v);
    for (int i = 7; i >= 0; i--) rbit(v[i]);
    wbit(!send_ack);
  endtask

  function automatic logic [7:0] expect_rd(input int a);
    if (a < 4) return model[a];
    if (a >= 16 && a < 32) return st[(a - 16) * 8 +: 8];
    return 8'h00;
  endfunction

  task automatic check_ack(input logic ack, input string what);
    checks++;
    if (!ack) begin failures++; $display("no ACK for %s", what); end
  endtask

  initial begin
    logic ack;
    logic [7:0] v;
    int p, n;
    for (int i = 0; i < 4; i++) model[i] = 8'h00;
    st = {$urandom, $urandom, $urandom, $urandom};
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    for (int t = 0; t < 60; t++) begin
      case ($urandom_range(0, 3))
        0, 1: begin  // write
          p = ($urandom_range(0, 3) == 0) ? $urandom_range(14, 20) : $urandom_range(0, 3);
          n = $urandom_range(1, 4);
          start();
          wbyte({7'h3A, 1'b0}, ack); check_ack(ack, "address");
          wbyte(8'(p), ack); check_ack(ack, "pointer");
          for (int i = 0; i < n; i++) begin
            v = 8'($urandom);
            wbyte(v, ack); check_ack(ack, "data");
            if (p + i < 4) model[p + i] = v;
          end
          stop();
        end
        2: begin  // read
          p = $urandom_range(0, 2) == 0 ? $urandom_range(0, 3) : $urandom_range(4, 31);
          n = $urandom_range(1, 6);
          st = {$urandom, $urandom, $urandom, $urandom};
          start();
          wbyte({7'h3A, 1'b0}, ack); check_ack(ack, "address");
          wbyte(8'(p), ack); check_ack(ack, "pointer");
          start();
          wbyte({7'h3A, 1'b1}, ack); check_ack(ack, "read address");
          for (int i = 0; i < n; i++) begin
            rbyte(i < n - 1, v);
            checks++;
            if (v !== expect_rd(p + i)) begin failures++; $display("read reg %0d: %h exp %h", p + i, v, expect_rd(p + i)); end
          end
          stop();
        end
        default: begin  // other device
          start();
          wbyte({7'h3B, 1'b0}, ack);
          checks++;
          if (ack) begin failures++; $display("ACK for a foreign address"); end
          wbyte(8'h00, ack);
          wbyte(8'hFF, ack);
          stop();
        end
      endcase
      checks++;
      if (cfg !== {model[3], model[2], model[1], model[0]}) begin
        failures++; $display("cfg %h exp %h%h%h%h", cfg, model[3], model[2], model[1], model[0]);
      end
      checks++;
      if (cfg_mism) begin failures++; $display("cfg copies disagree"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #50000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
