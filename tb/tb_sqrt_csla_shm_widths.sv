// tb_sqrt_csla_shm_widths: self-checking test of the adder's width
// parameter. Adders of 1, 2, 5, 8, 24 and 32 bits (where the last group is
// clipped or the partition goes beyond the five groups of the 16-bit
// design) are each given 20,000 random vectors plus the all-ones carry
// ripple; {cout, sum} must equal a + b + cin. A watchdog ends a hung run as
// a failure.
module tb_sqrt_csla_shm_widths;
  localparam int NRAND = 20000;

  int checks = 0, failures = 0;

  logic [0:0]  a1,  b1,  s1;   logic c1,  o1;
  logic [1:0]  a2,  b2,  s2;   logic c2,  o2;
  logic [4:0]  a5,  b5,  s5;   logic c5,  o5;
  logic [7:0]  a8,  b8,  s8;   logic c8,  o8;
  logic [23:0] a24, b24, s24;  logic c24, o24;
  logic [31:0] a32, b32, s32;  logic c32, o32;

  sqrt_csla_shm #(.WIDTH(1))  d1  (.a(a1),  .b(b1),  .cin(c1),  .sum(s1),  .cout(o1));
  sqrt_csla_shm #(.WIDTH(2))  d2  (.a(a2),  .b(b2),  .cin(c2),  .sum(s2),  .cout(o2));
  sqrt_csla_shm #(.WIDTH(5))  d5  (.a(a5),  .b(b5),  .cin(c5),  .sum(s5),  .cout(o5));
  sqrt_csla_shm #(.WIDTH(8))  d8  (.a(a8),  .b(b8),  .cin(c8),  .sum(s8),  .cout(o8));
  sqrt_csla_shm #(.WIDTH(24)) d24 (.a(a24), .b(b24), .cin(c24), .sum(s24), .cout(o24));
  sqrt_csla_shm #(.WIDTH(32)) d32 (.a(a32), .b(b32), .cin(c32), .sum(s32), .cout(o32));

  task automatic check(input int w, input longint a, input longint b,
                       input longint c, input longint got);
    checks++;
    if (got != a + b + c) begin
      failures++;
      if (failures < 10)
        $display("FAIL W=%0d a=%h b=%h cin=%0d -> %h expected %h", w, a, b, c, got, a + b + c);
    end
  endtask

  initial begin
    for (int n = 0; n <= NRAND; n++) begin
      if (n == NRAND) begin
        // all-ones plus carry in: carry crosses every group
        a1 = '1; a2 = '1; a5 = '1; a8 = '1; a24 = '1; a32 = '1;
        b1 = '0; b2 = '0; b5 = '0; b8 = '0; b24 = '0; b32 = '0;
        {c1, c2, c5, c8, c24, c32} = '1;
      end else begin
        {a1, a2, a5, a8} = 16'($urandom);
        {b1, b2, b5, b8} = 16'($urandom);
        a24 = 24'($urandom); b24 = 24'($urandom);
        a32 = $urandom;      b32 = $urandom;
        {c1, c2, c5, c8, c24, c32} = 6'($urandom);
      end
      #1;
      check(1,  longint'(a1),  longint'(b1),  longint'(c1),  longint'({o1, s1}));
      check(2,  longint'(a2),  longint'(b2),  longint'(c2),  longint'({o2, s2}));
      check(5,  longint'(a5),  longint'(b5),  longint'(c5),  longint'({o5, s5}));
      check(8,  longint'(a8),  longint'(b8),  longint'(c8),  longint'({o8, s8}));
      check(24, longint'(a24), longint'(b24), longint'(c24), longint'({o24, s24}));
      check(32, longint'(a32), longint'(b32), longint'(c32), longint'({o32, s32}));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(NRAND * 2 + 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
