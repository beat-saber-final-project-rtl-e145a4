03c0500032000
064050004b501
08c0500064202
0b4050007d703
03c0800096004
06408000af505
08c08000c8206
0b408000e1707
03c0b000fa008
0640b00113509
08c0b0012c20a
0b40b0014570b
03c050015e00c
064050017750d
08c050019020e
0b405001a970f
03c08001c2010
06408001db511
08c08001f4212
0b4080020d713
03c0b00226014
0640b0023f515
08c0b00258216
0b40b00271717
03c050028a018
06405002a3519
08c05002bc21a
0b405002d571b
03c08002ee01c
064080030751d
08c080032021e
0b4080033971f
7ffffffffffff
