// tb_ram_addresser -- checks the RAM address unit: DIR loads from the bus
// on dir_car, SP counts on sp_car (down when sp_dec), and addr is DIR when
// sel_sp = 0 and SP when sel_sp = 1. Random stimulus against a model.
module tb_ram_addresser;
  logic clk = 0, rst, dir_car, sp_car, sp_dec, sel_sp;
  logic [7:0] bus, addr, sp, m_dir, m_sp;
  int checks = 0, failures = 0;

  ram_addresser dut (
    .clk(clk), .rst(rst), .dir_car(dir_car), .sp_car(sp_car), .sp_dec(sp_dec),
    .sel_sp(sel_sp), .bus(bus), .addr(addr), .sp(sp)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; dir_car = 0; sp_car = 0; sp_dec = 0; sel_sp = 0; bus = 0;
    @(negedge clk);
    m_dir = 0; m_sp = 0;
    for (int i = 0; i < 1000; i++) begin
      rst = ($urandom_range(0, 63) == 0);
      dir_car = $urandom_range(0, 1);
      sp_car = $urandom_range(0, 1);
      sp_dec = $urandom_range(0, 1);
      bus = 8'($urandom);
      @(negedge clk);
      if (rst) begin m_dir = 0; m_sp = 0; end
      else begin
        if (dir_car) m_dir = bus;
        if (sp_car) m_sp = sp_dec ? m_sp - 8'd1 : m_sp + 8'd1;
      end
      sel_sp = $urandom_range(0, 1);
      #1;
      checks++;
      if (addr !== (sel_sp ? m_sp : m_dir) || sp !== m_sp) begin
        failures++; $display("FAIL addr=%h sp=%h dir=%h msp=%h sel=%b", addr, sp, m_dir, m_sp, sel_sp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
