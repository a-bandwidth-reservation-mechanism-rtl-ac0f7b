// tb_abu_decoupler: self-checking test of the valid/ready switch.
//
// Random enable, valid, ready and payload values are applied and every
// combination is compared with the expected switch behaviour: when enabled
// the handshake passes both ways, when disabled the slave sees no valid and
// the master no ready, and the payload always passes unchanged. The test
// also counts accepted transfers on both sides, which must always agree.
module tb_abu_decoupler;
  typedef logic [15:0] data_t;

  logic  enable, s_valid, s_ready, m_valid, m_ready;
  data_t s_data, m_data;

  int checks = 0, failures = 0;
  int up_hs = 0, down_hs = 0, blocked = 0;

  abu_decoupler #(.T(data_t)) dut (
    .enable, .s_valid, .s_ready, .s_data, .m_valid, .m_ready, .m_data
  );

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      enable  = 1'($urandom());
      s_valid = 1'($urandom());
      m_ready = 1'($urandom());
      s_data  = 16'($urandom());
      #1;
      checks++;
      if (m_valid !== (s_valid && enable) || s_ready !== (m_ready && enable) ||
          m_data !== s_data) begin
        failures++;
        $display("FAIL en=%b sv=%b mr=%b -> mv=%b sr=%b", enable, s_valid, m_ready,
                 m_valid, s_ready);
      end
      if (s_valid && s_ready) up_hs++;
      if (m_valid && m_ready) down_hs++;
      if (!enable && s_valid && m_ready) blocked++;
      #1;
    end
    checks++;
    if (up_hs != down_hs || blocked == 0 || up_hs == 0) begin
      failures++;
      $display("FAIL transfers up=%0d down=%0d blocked=%0d", up_hs, down_hs, blocked);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
