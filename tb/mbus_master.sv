// Behavioural M-Bus (I2C-style) bus master for the testbenches.
//
// Drives SCL and, open-drain, SDA: sda_o = 0 pulls the line low, 1
// releases it. The line value, with the slave's pull-down, comes back on
// sda. HALF is half an SCL period in simulation time units. Tasks:
// start(), stop(), send_byte(value, ack) which sends eight bits MSB first
// and returns whether the slave pulled SDA low in the ninth clock.
module mbus_master #(
  parameter int HALF = 200
) (
  output logic scl,
  output logic sda_o,
  input  logic sda
);

  initial begin
    scl   = 1'b1;
    sda_o = 1'b1;
  end

  task automatic start();
    sda_o = 1'b1;
    #(HALF / 2);
    scl = 1'b1;
    #(HALF / 2);
    sda_o = 1'b0;        // SDA falls while SCL is high
    #(HALF / 2);
    scl = 1'b0;
    #(HALF / 2);
  endtask

  task automatic stop();
    sda_o = 1'b0;
    #(HALF / 2);
    scl = 1'b1;
    #(HALF / 2);
    sda_o = 1'b1;        // SDA rises while SCL is high
    #HALF;
  endtask

  task automatic send_byte(input logic [7:0] value, output bit ack);
    for (int i = 7; i >= 0; i--) begin
      sda_o = value[i];
      #(HALF / 2);
      scl = 1'b1;
      #HALF;
      scl = 1'b0;
      #(HALF / 2);
    end
    sda_o = 1'b1;        // release for the acknowledge
    #(HALF / 2);
    scl = 1'b1;
    #(HALF / 2);
    ack = !sda;
    #(HALF / 2);
    scl = 1'b0;
    #(HALF / 2);
  endtask

endmodule
