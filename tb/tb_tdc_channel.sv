// tb_tdc_channel: applies known VCO states (Johnson code) and coarse
// counter values, pulses the hit input and checks that each rising edge
// stores the coarse value and the binary position of the VCO state into
// alternating banks and advances the Gray-coded edge count.
module tb_tdc_channel;
  import mutrig_pkg::*;
  logic hit = 0, rst_n = 1;
  logic [15:0] ph;
  logic [14:0] cc;
  logic [1:0] gray;
  stamp_t bank [2];
  int checks = 0, failures = 0;

  tdc_channel dut (.hit, .rst_n, .vco_phase(ph), .cc, .edge_gray(gray), .bank);

  function automatic logic [15:0] johnson(int s);
    logic [15:0] v = '0;
    if (s <= 16) for (int i = 0; i < s; i++) v[i] = 1'b1;
    else begin v = '1; for (int i = 0; i < s - 16; i++) v[i] = 1'b0; end
    return v;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] exp_gray [4] = '{2'b00, 2'b01, 2'b11, 2'b10};
    ph = '0; cc = '0;
    #1 rst_n = 0;
    #9 rst_n = 1;
    for (int n = 0; n < 64; n++) begin
      automatic int s = (n * 7 + 3) % 32;
      automatic logic [14:0] c = 15'($urandom);
      ph = johnson(s); cc = c;
      #5 hit = 1;
      #5 ph = johnson((s + 5) % 32); cc = ~c;   // later changes must not matter
      #5 hit = 0;
      #5;
      checks++;
      if (bank[n % 2].cc != c || bank[n % 2].fine != 5'(s) || bank[n % 2].badhit) begin
        failures++;
        $display("FAIL edge %0d: bank cc=%h fine=%0d expected %h %0d", n, bank[n%2].cc, bank[n%2].fine, c, s);
      end
      checks++;
      if (gray != exp_gray[(n + 1) % 4]) begin
        failures++;
        $display("FAIL edge %0d: gray %b", n, gray);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
