// tb_p4nf_parser: checks the P4NF header parser. Random Interests (1..8
// components of 1..31 characters, followed by TLV bytes) must give the
// component count and lengths, the first characters of every component, its
// crc32 and the chained name hash, all worked out here independently; Data
// packets must give their 32-bit name hash; malformed headers must be
// flagged. Back-pressure on the descriptor output is applied at random.
`timescale 1ns/1ps
module tb_p4nf_parser;
  import cofib_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid = 0, in_ready, in_last = 0, out_valid, out_ready = 1, out_ok, out_is_interest;
  logic [7:0]  in_data = 0;
  logic [3:0]  in_port = 0;
  ipkt_desc_t  out_desc;
  logic [31:0] out_dhash;

  p4nf_parser dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] crc(byte unsigned s[$]);
    logic [31:0] c = 32'hFFFF_FFFF;
    for (int i = 0; i < s.size(); i++) begin
      c ^= {24'd0, s[i]};
      repeat (8) c = (c >> 1) ^ (32'hEDB8_8320 & {32{c[0]}});
    end
    return ~c;
  endfunction

  typedef struct {
    bit          ok, is_int;
    int          n, port;
    int          len [8];
    logic [31:0] asc [8];
    logic [31:0] c [8];
    logic [31:0] h;
  } exp_t;
  exp_t expq [$];

  task automatic send(byte unsigned b[$], int port);
    @(negedge clk);
    for (int i = 0; i < b.size(); i++) begin
      in_valid = 1; in_data = b[i]; in_last = (i == b.size() - 1); in_port = 4'(port);
      while (!in_ready) @(negedge clk);
      @(negedge clk);
    end
    in_valid = 0; in_last = 0;
  endtask

  task automatic interest(int port);
    byte unsigned b[$], comp[$];
    exp_t x;
    x.ok = 1; x.is_int = 1; x.port = port;
    x.n = $urandom_range(1, 8);
    x.h = 0;
    b.push_back(8'hF0 | 8'(x.n));
    for (int j = 0; j < x.n; j++) begin
      x.len[j] = $urandom_range(1, 31);
      b.push_back(8'(x.len[j]));
    end
    for (int j = 0; j < x.n; j++) begin
      comp.delete();
      x.asc[j] = 0;
      for (int i = 0; i < x.len[j]; i++) begin
        byte unsigned ch = 8'($urandom_range(33, 126));
        comp.push_back(ch);
        b.push_back(ch);
        if (i < 4) x.asc[j] = (x.asc[j] << 8) | 32'(ch);
      end
      x.c[j] = crc(comp);
      x.h = (j == 0) ? x.c[j] : 32'h0100_0193 * x.h + x.c[j];
    end
    repeat ($urandom_range(0, 4)) b.push_back(8'($urandom));
    expq.push_back(x);
    send(b, port);
  endtask

  task automatic datapkt(logic [31:0] h);
    byte unsigned b[$];
    exp_t x;
    x.ok = 1; x.is_int = 0; x.h = h; x.n = 0; x.port = 0;
    b.push_back(8'h00); b.push_back(8'd32);
    b.push_back(h[31:24]); b.push_back(h[23:16]); b.push_back(h[15:8]); b.push_back(h[7:0]);
    b.push_back(8'h33);
    expq.push_back(x);
    send(b, 0);
  endtask

  task automatic bad(byte unsigned b[$]);
    exp_t x;
    x.ok = 0; x.is_int = 0; x.n = 0; x.port = 0; x.h = 0;
    expq.push_back(x);
    send(b, 0);
  endtask

  int n_out = 0;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    exp_t x;
    n_out++;
    if (expq.size() == 0) check(0, "unexpected descriptor");
    else begin
      x = expq.pop_front();
      check(out_ok == x.ok, $sformatf("ok %0d exp %0d", out_ok, x.ok));
      if (x.ok) begin
        check(out_is_interest == x.is_int, "packet kind");
        if (x.is_int) begin
          check(int'(out_desc.n) == x.n, "component count");
          check(int'(out_desc.in_port) == x.port, "port");
          for (int j = 0; j < x.n; j++) begin
            check(int'(out_desc.len[j]) == x.len[j], $sformatf("len[%0d]", j));
            check(out_desc.ascii[j] == x.asc[j], $sformatf("ascii[%0d] %h exp %h", j, out_desc.ascii[j], x.asc[j]));
            check(out_desc.crc[j] == x.c[j], $sformatf("crc[%0d] %h exp %h", j, out_desc.crc[j], x.c[j]));
          end
          check(out_desc.name_hash == x.h, $sformatf("name hash %h exp %h", out_desc.name_hash, x.h));
        end else begin
          check(out_dhash == x.h, $sformatf("data hash %h exp %h", out_dhash, x.h));
        end
      end
    end
  end

  always @(posedge clk) out_ready <= ($urandom_range(0, 3) != 0);

  initial begin
    byte unsigned b[$];
    int expected;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // known value: crc32("123456789") = CBF43926
    b = '{8'h31, 8'h32, 8'h33, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39};
    check(crc(b) == 32'hCBF4_3926, "reference crc32");
    for (int p = 0; p < 60; p++) begin
      if (p % 7 == 3) datapkt($urandom);
      else interest(p % 16);
    end
    bad('{8'h35, 8'h01});                       // bad type
    bad('{8'hF0, 8'h01});                       // n = 0
    bad('{8'hF9, 8'h01});                       // n = 9
    bad('{8'hF1, 8'd32, 8'h61});                // component of 32
    bad('{8'hF2, 8'd3, 8'd1, 8'h61});           // cut inside the name
    bad('{8'h00, 8'd16, 8'h01, 8'h02});         // 16-bit Data hash
    expected = 66;
    repeat (50) @(posedge clk);
    check(n_out == expected, $sformatf("descriptors %0d exp %0d", n_out, expected));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
