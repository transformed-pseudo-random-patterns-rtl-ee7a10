// tb_cube_mapping: self-checking testbench for one cube mapping.
//
// Instance u_fig is the three-input example M(a1'a2 -> a2'a3): its expected
// outputs are the hand-written eight-row table (010 and 011 go to 001, all
// else unchanged). Instance u_wide is an 8-input mapping with mixed literal
// polarities; it is checked exhaustively, with an independent line value on
// pin, against a reference written from the cube-mapping definition using
// cube strings over {0,1,X}. Both are also checked with test_mode low, where
// the output must equal pin and the decoder must stay off.
module tb_cube_mapping;

  int checks = 0, failures = 0;

  // ---------------------------------------------------------- reference
  // Is pattern a (MSB = first character) contained in cube c?
  function automatic bit contained(input logic [7:0] a, input string c);
    int n = c.len();
    for (int i = 0; i < n; i++) begin
      if (c[i] == "0" && a[n-1-i] != 1'b0) return 0;
      if (c[i] == "1" && a[n-1-i] != 1'b1) return 0;
    end
    return 1;
  endfunction

  // Force the literals of image cube c onto line p.
  function automatic logic [7:0] apply_image(input logic [7:0] p, input string c);
    int n = c.len();
    logic [7:0] r = p;
    for (int i = 0; i < n; i++) begin
      if (c[i] == "0") r[n-1-i] = 1'b0;
      if (c[i] == "1") r[n-1-i] = 1'b1;
    end
    return r;
  endfunction

  task automatic check(input string what, input logic [7:0] got, input logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  // ----------------------------------------------------- three-input case
  logic       tm3;
  logic [2:0] a3, b3;
  logic       h3;
  cube_mapping u_fig (.test_mode(tm3), .orig(a3), .pin(a3), .pout(b3), .hit(h3));

  // ------------------------------------------------------ eight-input case
  localparam string WSRC = "1X0X01XX";
  localparam string WIMG = "0XX1XX10";
  logic       tm8;
  logic [7:0] o8, p8, q8;
  logic       h8;
  cube_mapping #(
    .N(8),
    .SRC_MASK(8'b1010_1100), .SRC_VAL(8'b1000_0100),
    .IMG_MASK(8'b1001_0011), .IMG_VAL(8'b0001_0010)
  ) u_wide (.test_mode(tm8), .orig(o8), .pin(p8), .pout(q8), .hit(h8));

  logic [2:0] fig_out [8] = '{3'b000, 3'b001, 3'b001, 3'b001,
                              3'b100, 3'b101, 3'b110, 3'b111};

  initial begin
    int hits = 0;
    // Three-input example, test mode on
    tm3 = 1'b1;
    for (int v = 0; v < 8; v++) begin
      a3 = 3'(v);
      #1;
      check($sformatf("3-input %03b", a3), 8'(b3), 8'(fig_out[v]));
      check("3-input hit", 8'(h3), 8'(v == 2 || v == 3));
    end
    // Three-input example, test mode off: identity
    tm3 = 1'b0;
    for (int v = 0; v < 8; v++) begin
      a3 = 3'(v);
      #1;
      check("3-input off", 8'(b3), 8'(v));
      check("3-input off hit", 8'(h3), 8'b0);
    end
    // Eight-input mapping, exhaustive over orig, pseudo-random pin
    for (int m = 0; m < 2; m++) begin
      tm8 = m[0];
      for (int v = 0; v < 256; v++) begin
        logic [7:0] exp;
        bit in_src;
        o8 = 8'(v);
        p8 = 8'($urandom);
        #1;
        in_src = tm8 && contained(o8, WSRC);
        exp = in_src ? apply_image(p8, WIMG) : p8;
        hits += int'(in_src);
        check($sformatf("8-input tm=%0d orig=%b pin=%b", tm8, o8, p8), q8, exp);
        check("8-input hit", 8'(h8), 8'(in_src));
      end
    end
    checks++;
    if (hits != 16) begin
      failures++;
      $display("FAIL 8-input source cube should contain 16 patterns, saw %0d", hits);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
